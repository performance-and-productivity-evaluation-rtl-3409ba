// bfs_pkg: graph layout and configuration shared by the BFS unit's modules.
//
// The graph lives in coprocessor memory (one 64-bit word per entry):
//   vinfo[v]  bits 31:0 word address of v's neighbour list, bits 63:32 degree
//   adj[...]  one neighbour vertex number per word
//   visited[v] 0 = not yet reached; claimed with an atomic fetch-and-add
//   level[v]  BFS level, written when v is reached
//   queue 0 / queue 1  vertex lists of the even / odd levels
//   cnt[L]    number of vertices in the queue of level L (grown atomically)
//   barrier   counter all units add 1 to at the end of each level
// The host sets visited[src] = 1, level[src] = 0, queue0[0] = src, cnt[0] = 1, and
// zeroes the other counters, the barrier and visited[].
package bfs_pkg;
  typedef struct packed {
    logic [7:0]  unit_id;     // this unit's number, 0 .. n_units-1
    logic [7:0]  n_units;     // units taking part
    logic [31:0] vinfo_base;
    logic [31:0] vis_base;
    logic [31:0] lvl_base;
    logic [31:0] q0_base;
    logic [31:0] q1_base;
    logic [31:0] cnt_base;
    logic [31:0] bar_addr;
  } bfs_cfg_t;

  // requester numbers, carried in the top two bits of a memory tag
  localparam logic [1:0] BFS_REQ_MASTER = 2'd0;
  localparam logic [1:0] BFS_REQ_KERNEL = 2'd1;
  localparam logic [1:0] BFS_REQ_ENQ    = 2'd2;
endpackage
