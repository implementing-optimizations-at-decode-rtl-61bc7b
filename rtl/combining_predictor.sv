// Combining predictor: predicts whether a pair of word loads or word stores
// to consecutive addresses can be merged into one naturally aligned
// double-word reference.
//
// It is a direct-mapped table indexed by the PC of the first instruction of
// the pair. Each entry holds a tag, information about the second instruction
// (kind and dynamic distance) and the last HIST_BITS alignment outcomes,
// newest in bit 0. The history shifts left on each outcome reported by the
// core. The decoder is told to combine when the tag matches and the history
// is 1111 (the address is steadily double-word aligned) or 1010 (the base
// register moves by one word each time, so the next instance is aligned).
// Entry layout, history length and the two patterns follow the original speculative-decode scheme;
// the tag width, the reset state and the port protocol are this design's.
//
// Ports:
//   lookup (decode):      PORTS ports, lk_pc -> lk_hit, lk_combine, lk_info;
//                         combinational.
//   allocate (detector):  PORTS ports al_valid/al_pc/al_info; an entry
//                         already owned by the same PC keeps its history, any
//                         other entry is replaced with an empty
//                         (all-unaligned) history.
//   update (core):        up_valid/up_pc/up_aligned; shifts the outcome into
//                         a matching entry. Writes take effect on the next
//                         clock edge. An allocation by another PC replaces
//                         the entry even if an outcome arrives for it in the
//                         same cycle.
module combining_predictor
  import sd_pkg::*;
#(
  parameter int unsigned ENTRIES   = 1024,
  parameter int unsigned HIST_BITS = 4,
  parameter int unsigned PORTS     = 4    // lookup and allocation ports
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // lookup, one port per decode slot
  input  logic       [PORTS-1:0][31:0] lk_pc,
  output logic       [PORTS-1:0]       lk_hit,
  output logic       [PORTS-1:0]       lk_combine,
  output next_info_t [PORTS-1:0]       lk_info,
  // allocation from the sequence detector, one port per fetch slot
  input  logic       [PORTS-1:0]       al_valid,
  input  logic       [PORTS-1:0][31:0] al_pc,
  input  next_info_t [PORTS-1:0]       al_info,
  // alignment outcome from the core
  input  logic                        up_valid,
  input  logic [31:0]                 up_pc,
  input  logic                        up_aligned
);

  localparam int unsigned IDX_BITS = $clog2(ENTRIES);
  localparam int unsigned TAG_BITS = 30 - IDX_BITS;

  typedef logic [IDX_BITS-1:0] idx_t;
  typedef logic [TAG_BITS-1:0] tag_t;

  logic                 valid_q [ENTRIES];
  tag_t                 tag_q   [ENTRIES];
  next_info_t           info_q  [ENTRIES];
  logic [HIST_BITS-1:0] hist_q  [ENTRIES];

  function automatic idx_t idx_of(input logic [31:0] pc);
    return pc[IDX_BITS+1:2];
  endfunction
  function automatic tag_t tag_of(input logic [31:0] pc);
    return pc[31:IDX_BITS+2];
  endfunction

  // Table 3 patterns, written for any history length: all ones, or
  // alternating with the newest outcome unaligned.
  function automatic logic combine_pattern(input logic [HIST_BITS-1:0] h);
    logic [HIST_BITS-1:0] alt;
    for (int i = 0; i < HIST_BITS; i++) alt[i] = i[0];
    return (h == '1) || (h == alt);
  endfunction

  // ---------------------------------------------------------------- lookup
  always_comb begin
    for (int p = 0; p < int'(PORTS); p++) begin
      idx_t i;
      i = idx_of(lk_pc[p]);
      lk_hit[p]     = valid_q[i] && (tag_q[i] == tag_of(lk_pc[p]));
      lk_info[p]    = info_q[i];
      lk_combine[p] = lk_hit[p] && combine_pattern(hist_q[i]);
    end
  end

  // ---------------------------------------------------------------- writes
  // An outcome is shifted into its entry unless an allocation replaces that
  // entry in the same cycle. Allocations are applied in port order, so a
  // later port wins when two allocate the same entry.
  idx_t up_idx;
  logic up_hit;
  logic [HIST_BITS-1:0] up_hist;
  logic up_blocked;
  assign up_idx  = idx_of(up_pc);
  assign up_hit  = valid_q[up_idx] && (tag_q[up_idx] == tag_of(up_pc));
  assign up_hist = {hist_q[up_idx][HIST_BITS-2:0], up_aligned};

  always_comb begin
    up_blocked = 1'b0;
    for (int p = 0; p < int'(PORTS); p++)
      if (al_valid[p] && idx_of(al_pc[p]) == up_idx && tag_of(al_pc[p]) != tag_of(up_pc))
        up_blocked = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) valid_q[i] <= 1'b0;
    end else begin
      for (int p = 0; p < int'(PORTS); p++)
        if (al_valid[p]) valid_q[idx_of(al_pc[p])] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (up_valid && up_hit && !up_blocked)
      hist_q[up_idx] <= up_hist;
    for (int p = 0; p < int'(PORTS); p++) begin
      if (al_valid[p]) begin
        tag_q[idx_of(al_pc[p])]  <= tag_of(al_pc[p]);
        info_q[idx_of(al_pc[p])] <= al_info[p];
        // a new owner starts from an empty history; the same owner keeps it
        if (!(valid_q[idx_of(al_pc[p])] && tag_q[idx_of(al_pc[p])] == tag_of(al_pc[p])))
          hist_q[idx_of(al_pc[p])] <= '0;
      end
    end
  end

endmodule
