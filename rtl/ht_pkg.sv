// ht_pkg: types shared by the coprocessor units.
//
// Every unit talks to coprocessor memory through one memory port. A port carries
// requests (valid/ready handshake) and returns read data in request order, tagged
// with the tag of the request. Addresses count 64-bit words. Writes get no response.
// The port format is this design's own choice; the platform's memory controllers
// are outside the design.
package ht_pkg;

  localparam int unsigned MEM_ADDR_W = 32;
  localparam int unsigned MEM_DATA_W = 64;
  localparam int unsigned MEM_TAG_W  = 12;

  typedef enum logic [1:0] {
    MEM_RD   = 2'd0,
    MEM_WR   = 2'd1,
    MEM_FADD = 2'd2   // atomic fetch-and-add: returns the old word, stores old+data
  } mem_op_e;

  typedef struct packed {
    mem_op_e                 op;
    logic [MEM_ADDR_W-1:0]   addr;
    logic [MEM_DATA_W-1:0]   data;
    logic [MEM_TAG_W-1:0]    tag;
  } mem_req_t;

  typedef struct packed {
    logic [MEM_DATA_W-1:0]   data;
    logic [MEM_TAG_W-1:0]    tag;
  } mem_rsp_t;

endpackage
