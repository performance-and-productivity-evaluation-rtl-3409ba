// sw_pkg: sizes and scoring constants shared by the Smith-Waterman unit.
//
// Residues are 5-bit codes, stored one per byte, eight to a 64-bit word. Code
// SW_PAD fills a query segment or database chunk past the end of its sequence and
// never scores as a match, so padding cannot raise the alignment score. Scores are
// unsigned SW_SCORE_W-bit numbers: local-alignment scores are never negative, and
// the gap values E and F are clamped at zero, which does not change H.
package sw_pkg;
  localparam int unsigned SW_N       = 8;    // PE array is SW_N x SW_N
  localparam int unsigned SW_RES_W   = 5;
  localparam int unsigned SW_SCORE_W = 16;
  localparam logic [SW_RES_W-1:0] SW_PAD = 5'd31;

  typedef logic [SW_RES_W-1:0]   res_t;
  typedef logic [SW_SCORE_W-1:0] score_t;

  // alignment job handed from the Control module to a Query-database thread
  typedef struct packed {
    logic [23:0] job_id;     // index of the database sequence
    logic [31:0] q_addr;     // word address of the query, 8 residues per word
    logic [15:0] q_len;      // residues
    logic [31:0] d_addr;     // word address of the database sequence
    logic [15:0] d_len;
    logic [31:0] scratch;    // scratch base: 4 words per database chunk hold a
                             // segment boundary
    logic [23:0] scr_stride; // words of scratch per thread; thread t uses
                             // scratch + t * scr_stride
  } sw_job_t;

  typedef struct packed {
    logic [23:0] job_id;
    score_t      score;
  } sw_result_t;

  // task the host dispatches to one unit (see sw_control)
  typedef struct packed {
    logic [31:0] q_addr;
    logic [15:0] q_len;
    logic [31:0] tbl_addr;
    logic [23:0] n_seqs;
    logic [31:0] res_addr;
    logic [31:0] scr_base;
    logic [23:0] scr_stride;
  } sw_cfg_t;
endpackage
