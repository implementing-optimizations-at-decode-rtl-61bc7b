// Silence predictor: decides per static store whether speculative decode
// leaves it alone, verifies it, or removes it.
//
// A direct-mapped table indexed by the store's PC (no tag). Each entry holds
// the low VALUE_BITS of the last value the store wrote, a saturating
// confidence counter and a saturating threshold counter. Training:
//   * each executed store compares its value with the history: +1 confidence
//     when equal, -1 when different; the history takes the new value;
//   * each verify outcome moves the threshold: -1 when the store was silent;
//     +PENALTY and a cleared confidence when it was not.
// Decision (the three states of the original predictor state machine), derived from
// the two counters so that no state bits are stored:
//   confidence <  threshold : No squash (store decoded unchanged)
//   confidence == threshold : Check     (load + compare + store)
//   confidence >  threshold : Squash    (load + trap, no store)
// Confidence rises by one at a time, so a store always passes through Check,
// and only a silent verify (which lowers the threshold) takes it to Squash.
// Table size, field widths, the +1/-1 and -1/+4 steps and the >= predict
// rule follow the original scheme; the initial threshold (4, the value in its
// worked example) and the derived-state encoding are this
// design's choices.
//
// The table (1024 x (8+6+6) bits, 2.5 kB) is a plain memory; one valid bit
// per entry, cleared at reset, makes untouched entries read as value 0,
// confidence 0 and the initial threshold.
//
// Ports: PORTS lookup ports, combinational (lk_pc -> lk_state). The train and verify
// ports write on the next clock edge; both may target the same entry in one
// cycle, in which case a not-silent verify clears the confidence regardless
// of the value comparison.
module silence_predictor
  import sd_pkg::*;
#(
  parameter int unsigned ENTRIES    = 1024,
  parameter int unsigned VALUE_BITS = 8,
  parameter int unsigned CONF_BITS  = 6,
  parameter int unsigned THRES_BITS = 6,
  parameter int unsigned PENALTY    = 4,
  parameter int unsigned INIT_THRES = 4,
  parameter int unsigned PORTS      = 4   // lookup ports, one per decode slot
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // lookup at decode
  input  logic       [PORTS-1:0][31:0]           lk_pc,
  output sil_state_e [PORTS-1:0]                 lk_state,
  output logic       [PORTS-1:0][CONF_BITS-1:0]  lk_conf,
  output logic       [PORTS-1:0][THRES_BITS-1:0] lk_thres,
  // value training from each executed store
  input  logic                  tr_valid,
  input  logic [31:0]           tr_pc,
  input  logic [31:0]           tr_value,
  // verify outcome from a compare or trap micro-op
  input  logic                  vf_valid,
  input  logic [31:0]           vf_pc,
  input  logic                  vf_silent
);

  localparam int unsigned IDX_BITS = $clog2(ENTRIES);
  typedef logic [IDX_BITS-1:0] idx_t;

  localparam logic [CONF_BITS-1:0]  CONF_MAX  = '1;
  localparam logic [THRES_BITS-1:0] THRES_MAX = '1;

  typedef struct packed {
    logic [VALUE_BITS-1:0] val;
    logic [CONF_BITS-1:0]  conf;
    logic [THRES_BITS-1:0] thres;
  } entry_t;

  localparam entry_t ENTRY_INIT = '{val: '0, conf: '0, thres: THRES_BITS'(INIT_THRES)};

  // The table itself has no reset; a per-entry valid bit makes an untouched
  // entry read as ENTRY_INIT, and the first write stores a whole entry.
  entry_t table_q [ENTRIES];
  logic   valid_q [ENTRIES];

  function automatic idx_t idx_of(input logic [31:0] pc);
    return pc[IDX_BITS+1:2];
  endfunction

  // ---------------------------------------------------------------- lookup
  always_comb begin
    for (int p = 0; p < int'(PORTS); p++) begin
      idx_t   i;
      entry_t e;
      i = idx_of(lk_pc[p]);
      e = valid_q[i] ? table_q[i] : ENTRY_INIT;
      lk_conf[p]  = e.conf;
      lk_thres[p] = e.thres;
      if (e.conf < e.thres)       lk_state[p] = SIL_NO_SQUASH;
      else if (e.conf == e.thres) lk_state[p] = SIL_CHECK;
      else                        lk_state[p] = SIL_SQUASH;
    end
  end

  // ---------------------------------------------------------------- training
  idx_t   tr_idx, vf_idx;
  entry_t tr_e, vf_e, tr_new, vf_new, both_new;
  logic   same_entry;
  logic [THRES_BITS:0] thres_plus;

  assign tr_idx     = idx_of(tr_pc);
  assign vf_idx     = idx_of(vf_pc);
  assign tr_e       = valid_q[tr_idx] ? table_q[tr_idx] : ENTRY_INIT;
  assign vf_e       = valid_q[vf_idx] ? table_q[vf_idx] : ENTRY_INIT;
  assign same_entry = tr_valid && vf_valid && (tr_idx == vf_idx);
  assign thres_plus = {1'b0, vf_e.thres} + (THRES_BITS+1)'(PENALTY);

  always_comb begin
    // value training: +1 on the same value, -1 on a different one
    tr_new     = tr_e;
    tr_new.val = tr_value[VALUE_BITS-1:0];
    if (tr_e.val == tr_value[VALUE_BITS-1:0])
      tr_new.conf = (tr_e.conf == CONF_MAX) ? CONF_MAX : tr_e.conf + 1'b1;
    else
      tr_new.conf = (tr_e.conf == '0) ? '0 : tr_e.conf - 1'b1;
    // verify outcome: -1 when silent, +PENALTY and cleared confidence if not
    vf_new = vf_e;
    if (vf_silent) begin
      vf_new.thres = (vf_e.thres == '0) ? '0 : vf_e.thres - 1'b1;
    end else begin
      vf_new.thres = thres_plus[THRES_BITS] ? THRES_MAX : thres_plus[THRES_BITS-1:0];
      vf_new.conf  = '0;
    end
    // both on one entry in the same cycle
    both_new       = tr_new;
    both_new.thres = vf_new.thres;
    if (!vf_silent) both_new.conf = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) valid_q[i] <= 1'b0;
    end else begin
      if (tr_valid) valid_q[tr_idx] <= 1'b1;
      if (vf_valid) valid_q[vf_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (tr_valid) table_q[tr_idx] <= same_entry ? both_new : tr_new;
    if (vf_valid && !same_entry) table_q[vf_idx] <= vf_new;
  end

endmodule
