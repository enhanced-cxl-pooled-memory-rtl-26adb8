# Sage: pooled-memory embedding access with cluster caching, prediction and look-ahead NDP

Several hosts run embedding-heavy inference against embedding tables kept in a shared CXL
pooled-memory device. Each CXL access costs about 200 ns. A batch finishes only when every
lookup of every sample has been served, so one cold identifier holds up the whole batch.
This design attacks that cost in three places:

1. **Host-reserved buffer (HRB) managed by clusters.** Each host keeps part of its DRAM as a cache
   of embedding rows. The unit of caching is a *cluster* of identifiers that tend to be used
   together, not a single row.
   - Looking up any member admits the whole cluster.
   - Clusters used in the current batch are pinned until the batch ends.
   - Victims are chosen by group LRU.
   - A cluster that cannot fit, even after evicting every unpinned cluster, bypasses the cache.
   - Each table gets its own byte region.
2. **Device-side prediction.** The pooled-memory device watches all hosts' lookups.
   - Per table, it counts how often identifier pairs occur together in a sliding window of the
     last W accesses.
   - It turns those counts into log-normalised affinities.
   - It keeps each identifier's K strongest affinities.
   - It re-clusters with mini-batch k-means under cosine distance.
   - Before the next batch, it ranks clusters by how strongly they relate to the recent
     accesses, with a penalty for large clusters. Each host's prefetcher stages the ranked
     clusters into its HRB under a byte budget and skips clusters that are already resident.
3. **Look-ahead near-data processing (NDP).** A host may offload the sparse-feature interaction
   of a sample to the device. That is the pairwise dot products of its 26 feature rows.
   - A token scheduler admits or refuses each request at once. A refused task is computed on
     the host.
   - Admitted tasks run on one of 32 NDP units, which fetch the rows from pooled memory.
   - Results go to a per-batch result buffer that the host reads back.
   - Hosts report whether results arrived late or early, and each host's token budget shrinks
     or grows to match.

## Blocks (`rtl/`)

| module | role |
|---|---|
| `sage_pkg` | shared types (lookup results), fixed-point log, affinity and size-penalty functions |
| `hrb_group_cache` | one host's HRB directory: hit / admit / bypass / skip, group LRU, pinning, per-table regions |
| `ctx_prefetcher` | one host's prefetch window: walks a ranked list, admits clusters under a byte budget |
| `locality_monitor` | merges the hosts' lookup reports into per-table streams; never stalls a host and drops reports it has no room for |
| `cooc_window` | one table's sliding window and pair counts freq(i,j) = n_i·n_j, and freq_max |
| `cluster_model` | top-K affinity vectors and mini-batch k-means (cosine) over identifiers touched since the last run |
| `cluster_ranker` | score s(g) = Σ_{i∈U} max_{j∈g} A(i,j) / \|g\|^α; emits clusters in decreasing score until the byte budget is met |
| `ndp_token_scheduler` | per-host token budgets, load-dependent grant, feedback adaptation, dispatch to idle units |
| `lookahead_ndp` | one NDP unit: loads F rows into its scratchpad, emits F(F−1)/2 dot products |
| `ndp_result_buffer` | per (host, token slot) result storage, read over the host side |
| `rr_arbiter` | round-robin arbiter helper |
| `sage_top` | everything wired together |

Handshakes are valid/ready throughout. All storage resets to empty. The co-occurrence arrays
spend N_IDS² cycles after reset clearing themselves.

### Default parameters

- From the document:
  - 8 hosts
  - 26 embedding tables, which are also the 26 features of an NDP task
  - 32 NDP units
  - 1 GB HRB per host
  - batch 64, used in the tests
- This design's choices:
  - 64 identifiers tracked per table
  - window W = 16
  - K = 4 retained affinities
  - 8 clusters per table
  - 64 directory slots per host
  - α = 0.5
  - 64-element int16 rows, so 128-byte entries
  - 4 tokens per host
  - NDP queue of 16
  - 32-bit addresses and 40-bit accumulators

## Where this design departs from the document or fills gaps

- **Scale of tracking.** The predictor tracks 64 identifiers per table. Real tables have millions
  of rows, so at the default size the model covers only a 64-identifier slice of each table.
  - The co-occurrence matrix is stored dense (N_IDS² counters). The document's matrix is sparse.
  - The logarithms are computed with a fixed-point log2 approximation.
- **Per-table regions.** Regions start equal and are set by software. Choosing region sizes
  from table cardinality is left to that software.
- **Prefetch walk.** It stops at the first cluster that would exceed the budget.
- **Bandwidth budget.** The CXL bandwidth budget is folded into the byte budget.
- **Cache keys after re-clustering.** Cache entries are keyed by cluster number. A cluster whose
  membership changes during re-clustering keeps its directory entry, with its old size, until
  it is evicted.
- **Cluster of a lookup.** The host learns it from the device's current partition, read
  directly. No separate host copy of the mapping is modelled.
- **Monitor sampling.** The monitor samples lookups best effort. Under heavy contention many
  reports are dropped, which the hardware counts.
- **Token cap.** The document's cap is per table. Here there is one cap for all tables.
  - A token is granted with probability (QDEPTH − depth)/QDEPTH.
  - Late feedback lowers the budget by one, down to a minimum of one.
  - Early feedback raises it by one, up to the cap.
- **NDP unit.** Each unit is one sequential datapath doing one multiply-accumulate per cycle.
  - The document's four sub-cores per unit are folded into this one datapath.
  - Its scratchpad holds one task (26 × 64 × 16 bit) instead of 128 KB.
- **Not built:**
  - the pooled DRAM, reached through the `mem_req_*` / `mem_rsp_*` ports;
  - the CXL link;
  - the hosts' CPUs, DRAM and MLPs;
  - the data copies that follow admissions and evictions.

## Workloads

The document evaluates Criteo TB (HRB 1 GB), Taobao (256 MB) and XNLI (64 MB), with 1 to 8 hosts
and batch 64.

- **Fits:** the host count, batch size, 26 tables and HRB sizes. The HRB sizes are set through
  `HRB_BYTES`.
- **Does not fit:** the table cardinalities, of millions of rows (own estimate; the document
  gives no count). At the defaults only 64 identifiers per table are modelled.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself on a watchdog.
The fault-injection runs below used a deliberately broken copy of each block.

| testbench | checks | failures | broken copy caught (checks failed) |
|---|---|---|---|
| `tb_hrb_group_cache` | 56 | 0 | 4 |
| `tb_ctx_prefetcher` (against the real cache) | 13 | 0 | 5 |
| `tb_locality_monitor` | 6035 | 0 | 1900 |
| `tb_cooc_window` (against a recount model) | 34802 | 0 | 1522 |
| `tb_cluster_model` | 12 | 0 | 5 |
| `tb_cluster_ranker` | 33 | 0 | 9 |
| `tb_ndp_token_scheduler` | 1546 | 0 | 2 |
| `tb_lookahead_ndp` | 101 | 0 | 32 |
| `tb_ndp_result_buffer` | 1000 | 0 | 348 |

`tb_sage_top` runs the whole system at its default parameters, with no overrides. This is
the largest size simulated. It takes about 9 minutes to build and run.

- **Batch 0:** 8 hosts × 64 samples × 26 lookups with contextual locality.
- **Between batches:** batch end, then re-clustering and ranking, then prefetch.
- **Batch 1.**
- **NDP offload:**
  - each host makes 5 requests against 4 tokens;
  - results are checked against dot products computed in the testbench;
  - tokens are returned and the late/early feedback is checked.

It counts each mechanism and fails if any never occurred:

- HRB hits, whole-cluster admissions, bypasses and evictions
- prefetch admissions and re-clustering moves
- NDP grants and refusals
- monitor drops

One run gave 11 845 hits and 901 admissions. It also gave 13 878 bypasses, because host 0's
table-0 region is deliberately smaller than a row. There were 441 evictions, 52 prefetched
clusters, 32 granted tasks and 8 refused ones. It ended with 183 checks and 0 failures.

`tb_sage_top_small` runs the same sequence in a few seconds on a reduced configuration:
2 hosts, 4 tables, 16 identifiers and 2 NDP units.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/sage_pkg.sv rtl/rr_arbiter.sv \
  rtl/hrb_group_cache.sv rtl/ctx_prefetcher.sv rtl/locality_monitor.sv rtl/cooc_window.sv \
  rtl/cluster_model.sv rtl/cluster_ranker.sv rtl/ndp_token_scheduler.sv rtl/lookahead_ndp.sv \
  rtl/ndp_result_buffer.sv rtl/sage_top.sv tb/tb_sage_top.sv --top-module tb_sage_top
./obj_dir/Vtb_sage_top
```

For a block testbench, give `rtl/sage_pkg.sv`, the block and the modules it uses, then
`tb/tb_<block>.sv`.
