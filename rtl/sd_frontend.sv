// Speculative-decode front end.
//
// Sits between instruction fetch and the out-of-order core. A group of up to
// FETCH_W fetched architected instructions arrives per cycle (slot 0 oldest);
// each is looked up, by PC, in the combining predictor and
// the silence predictor; the speculative decoder turns it into implementation
// micro-ops that express the predicted optimization explicitly, so the
// scheduler sees the optimized sequence and needs no late changes. In
// parallel the sequence detector watches the fetched stream for pairs of word
// loads or stores that could be combined and allocates predictor entries
// for them.
//
// The core closes the loop through three training ports and one recovery
// port:
//   up_*  alignment outcome of each word load/store (aligned = the address
//         is double-word aligned), reported with the instruction's PC;
//   tr_*  value written by each executed store;
//   vf_*  outcome of each silence verify (compare or trap micro-op);
//   rec_* a speculative form failed (unaligned dlw/dsw, or a trap of a
//         squashed store): the front end is flushed and the instruction at
//         rec_pc, fetched again, is decoded with no transformation.
// flush clears the front end for any other redirect.
//
// Timing: predictions are read in the fetch cycle and the group's micro-ops
// appear on out_* (packed in program order from slot 0) one cycle later.
// Predictor updates take effect on the next edge. Each training port takes
// one report per cycle; a wider core queues its reports in front of them.
// The arrangement (predictor trained by the core, decode transforming,
// recovery by draining and re-fetching) follows the original scheme; the port
// protocol, the output packing and the single training ports are this
// design's.
module sd_frontend
  import sd_pkg::*;
#(
  parameter int unsigned FETCH_W      = 4,
  parameter int unsigned COMB_ENTRIES = 1024,
  parameter int unsigned HIST_BITS    = 4,
  parameter int unsigned SIL_ENTRIES  = 1024,
  parameter int unsigned VALUE_BITS   = 8,
  parameter int unsigned CONF_BITS    = 6,
  parameter int unsigned THRES_BITS   = 6,
  parameter int unsigned PENALTY      = 4,
  parameter int unsigned INIT_THRES   = 4,
  parameter int unsigned MAX_DIST     = 4,
  parameter int unsigned OUT_W        = 3 * FETCH_W + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // fetch
  input  logic [FETCH_W-1:0]            in_valid,
  input  logic [FETCH_W-1:0][31:0]      in_pc,
  input  logic [FETCH_W-1:0][31:0]      in_inst,
  // training from the core
  input  logic                          up_valid,
  input  logic [31:0]                   up_pc,
  input  logic                          up_aligned,
  input  logic                          tr_valid,
  input  logic [31:0]                   tr_pc,
  input  logic [31:0]                   tr_value,
  input  logic                          vf_valid,
  input  logic [31:0]                   vf_pc,
  input  logic                          vf_silent,
  // recovery and flush
  input  logic                          rec_valid,
  input  logic [31:0]                   rec_pc,
  input  logic                          flush,
  // micro-ops to the core
  output logic [OUT_W-1:0]              out_valid,
  output uop_t [OUT_W-1:0]              out_uop,
  // events, one bit per fetch slot
  output logic [FETCH_W-1:0]            ev_alloc,
  output logic [FETCH_W-1:0]            ev_load_comb,
  output logic [FETCH_W-1:0]            ev_store_comb,
  output logic [FETCH_W-1:0]            ev_sil_check,
  output logic [FETCH_W-1:0]            ev_sil_squash,
  output logic [FETCH_W-1:0]            ev_nosd
);

  logic       [FETCH_W-1:0]       comb_predict;
  next_info_t [FETCH_W-1:0]       comb_info;
  sil_state_e [FETCH_W-1:0]       sil_state;
  logic       [FETCH_W-1:0]       al_valid;
  logic       [FETCH_W-1:0][31:0] al_pc;
  next_info_t [FETCH_W-1:0]       al_info;

  sequence_detector #(.FETCH_W(FETCH_W), .MAX_DIST(MAX_DIST)) u_seq (
    .clk, .rst_n,
    .in_valid, .in_pc, .in_inst,
    .flush   (flush || rec_valid),
    .al_valid, .al_pc, .al_info
  );

  combining_predictor #(
    .ENTRIES(COMB_ENTRIES), .HIST_BITS(HIST_BITS), .PORTS(FETCH_W)
  ) u_comb (
    .clk, .rst_n,
    .lk_pc      (in_pc),
    .lk_hit     (),
    .lk_combine (comb_predict),
    .lk_info    (comb_info),
    .al_valid, .al_pc, .al_info,
    .up_valid, .up_pc, .up_aligned
  );

  silence_predictor #(
    .ENTRIES(SIL_ENTRIES), .VALUE_BITS(VALUE_BITS), .CONF_BITS(CONF_BITS),
    .THRES_BITS(THRES_BITS), .PENALTY(PENALTY), .INIT_THRES(INIT_THRES),
    .PORTS(FETCH_W)
  ) u_sil (
    .clk, .rst_n,
    .lk_pc    (in_pc),
    .lk_state (sil_state),
    .lk_conf  (),
    .lk_thres (),
    .tr_valid, .tr_pc, .tr_value,
    .vf_valid, .vf_pc, .vf_silent
  );

  sd_decoder #(.FETCH_W(FETCH_W), .OUT_W(OUT_W)) u_dec (
    .clk, .rst_n,
    .in_valid, .in_pc, .in_inst,
    .comb_predict,
    .comb_info,
    .sil_state,
    .rec_valid, .rec_pc, .flush,
    .out_valid, .out_uop,
    .ev_load_comb, .ev_store_comb, .ev_sil_check, .ev_sil_squash, .ev_nosd
  );

  assign ev_alloc = al_valid;

endmodule
