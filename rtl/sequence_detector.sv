// Sequence detector: finds combinable pairs of word references in the
// dynamic instruction stream and allocates combining-predictor entries.
//
// It watches the fetched instructions, a group of up to FETCH_W per cycle in
// program order (slot 0 oldest), and remembers the most
// recent word load or word store as a pending candidate. A later instruction
// completes a pair when it is of the same kind, uses the same base register
// and its offset is the candidate's offset plus 4. Loads may be separated by
// ALU instructions, stores must be adjacent. The pair is rejected when the
// first load overwrites the base register, or when an intervening ALU
// instruction writes the base or the first load's destination (the second
// would read a changed base, or the double-word result would be lost before
// the extract). A completed pair raises al_valid[s] for one cycle, s being
// the slot of the second instruction, with the PC of the first instruction
// and its next-instruction info. The slots are examined one after the other
// within the cycle, so pairs inside a group and across groups are both
// found. Every instruction that
// can start a pair becomes the new candidate, so overlapping pairs (offsets
// 0/4, 4/8, 8/12) are all reported and the predictor learns which of them is
// aligned.
//
// The pairing rules (same base, offsets 4 apart, base not overwritten, loads
// interrupted only by ALU instructions, stores uninterrupted) come from the
// original scheme; the single candidate, the MAX_DIST window and the check on the
// first load's destination are this design's.
//
// Timing: al_* is registered, one cycle after the second instruction.
// flush clears the candidate (fetch redirect).
module sequence_detector
  import sd_pkg::*;
#(
  parameter int unsigned FETCH_W  = 4,  // instructions per cycle
  parameter int unsigned MAX_DIST = 4   // largest distance first -> second load
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic       [FETCH_W-1:0]       in_valid,
  input  logic       [FETCH_W-1:0][31:0] in_pc,
  input  logic       [FETCH_W-1:0][31:0] in_inst,
  input  logic                          flush,
  output logic       [FETCH_W-1:0]       al_valid,
  output logic       [FETCH_W-1:0][31:0] al_pc,
  output next_info_t [FETCH_W-1:0]       al_info
);

  typedef struct packed {
    logic                valid;
    logic                is_store;
    logic [31:0]         pc;
    logic [REG_BITS-1:0] base;
    logic [REG_BITS-1:0] rt;
    logic [15:0]         off;
    logic [2:0]          gap;   // instructions seen since the candidate
  } cand_t;

  cand_t cand_q, cand_d;
  logic       [FETCH_W-1:0]       match;
  logic       [FETCH_W-1:0][31:0] m_pc;
  next_info_t [FETCH_W-1:0]       m_info;

  always_comb begin
    cand_t c;
    c      = cand_q;
    match  = '0;
    m_pc   = '0;
    m_info = '0;
    for (int s = 0; s < int'(FETCH_W); s++) begin
      logic [31:0] ins;
      logic [2:0]  dist_next;
      logic        start_ld, start_st;
      ins       = in_inst[s];
      dist_next = c.gap + 3'd1;
      // r0 is hard-wired to zero, so it can neither receive nor supply the
      // 64-bit value of a combined pair.
      start_ld  = is_lw(ins) && (f_rt(ins) != f_rs(ins)) && (f_rt(ins) != '0);
      start_st  = is_sw(ins) && (f_rt(ins) != '0);
      if (in_valid[s]) begin
        // does this instruction complete a pair with the candidate?
        if (c.valid && f_rs(ins) == c.base && f_imm(ins) == c.off + 16'd4 &&
            c.off != 16'h7ffc && 32'(dist_next) <= MAX_DIST) begin
          if (c.is_store) match[s] = is_sw(ins) && (dist_next == 3'd1);
          else            match[s] = is_lw(ins);
        end
        m_pc[s]            = c.pc;
        m_info[s].is_store = c.is_store;
        m_info[s].distance = dist_next;
        // update the candidate
        if (start_ld || start_st) begin
          c.valid    = 1'b1;
          c.is_store = start_st;
          c.pc       = in_pc[s];
          c.base     = f_rs(ins);
          c.rt       = f_rt(ins);
          c.off      = f_imm(ins);
          c.gap      = 3'd0;
        end else if (c.valid && !c.is_store && is_alu(ins) &&
                     alu_dst(ins) != c.base && alu_dst(ins) != c.rt &&
                     32'(dist_next) < MAX_DIST) begin
          c.gap = dist_next;
        end else begin
          c.valid = 1'b0;
        end
      end
    end
    cand_d = c;
    if (flush) cand_d.valid = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cand_q   <= '0;
      al_valid <= '0;
      al_pc    <= '0;
      al_info  <= '0;
    end else begin
      cand_q   <= cand_d;
      al_valid <= flush ? '0 : match;
      al_pc    <= m_pc;
      al_info  <= m_info;
    end
  end

endmodule
