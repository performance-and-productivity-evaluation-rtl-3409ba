// mem_model: behavioural model of coprocessor memory for testbenches.
//
// NPORTS request ports share one word array. Each clock the ports are served in
// index order, so an atomic fetch-and-add is atomic across ports. Reads and
// fetch-and-adds return the old word LAT clocks later, in request order per port.
// A port refuses a request (ready low) with probability STALL_PCT percent.
module mem_model
  import ht_pkg::*;
#(
  parameter int unsigned NPORTS    = 1,
  parameter int unsigned WORDS     = 4096,
  parameter int unsigned LAT       = 8,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req_valid [NPORTS],
  input  mem_req_t        req       [NPORTS],
  output logic            req_ready [NPORTS],
  output logic            rsp_valid [NPORTS],
  output mem_rsp_t        rsp       [NPORTS]
);
  logic [MEM_DATA_W-1:0] mem [WORDS];
  logic     pv [NPORTS][LAT];
  mem_rsp_t pd [NPORTS][LAT];
  int unsigned n_reads, n_writes, n_atomics;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    n_reads = 0; n_writes = 0; n_atomics = 0;
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++)
      req_ready[p] <= ($urandom_range(99) >= STALL_PCT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++)
        for (int s = 0; s < LAT; s++) begin pv[p][s] <= 1'b0; pd[p][s] <= '0; end
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        for (int s = LAT-1; s > 0; s--) begin pv[p][s] <= pv[p][s-1]; pd[p][s] <= pd[p][s-1]; end
        pv[p][0] <= 1'b0;
        if (req_valid[p] && req_ready[p]) begin
          if (req[p].addr >= WORDS) $error("mem_model: address %0d out of range", req[p].addr);
          case (req[p].op)
            MEM_RD: begin
              pv[p][0] <= 1'b1; pd[p][0] <= '{data: mem[req[p].addr], tag: req[p].tag};
              n_reads++;
            end
            MEM_WR: begin mem[req[p].addr] = req[p].data; n_writes++; end
            MEM_FADD: begin
              pv[p][0] <= 1'b1; pd[p][0] <= '{data: mem[req[p].addr], tag: req[p].tag};
              mem[req[p].addr] = mem[req[p].addr] + req[p].data;
              n_atomics++;
            end
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      rsp_valid[p] = pv[p][LAT-1];
      rsp[p]       = pd[p][LAT-1];
    end
  end
endmodule
