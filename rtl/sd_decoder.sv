// Speculative decoder: translates architected instructions into
// implementation micro-ops, applying memory reference combining and silent
// store squashing when the predictors say so.
//
// A group of up to FETCH_W architected instructions enters per cycle
// (in_valid/in_pc/in_inst, slot 0 oldest), each with the predictions looked
// up for its PC. The slots are translated one after the other within the
// cycle, so a pair may lie inside one group or span two. The micro-ops of
// the group are packed in program order into OUT_W = 3*FETCH_W+1 output
// slots, registered (one cycle of decode latency):
//
//   lw rA,d(rB) ; [ALU ...] ; lw rC,d+4(rB)   combine predicted for the first
//       -> dlw rA,d(rB) ; [ALU ...] ; exthi rC,rA
//   sw rA,d(rB) ; sw rC,d+4(rB)                combine predicted for the first
//       -> sethi rA,rC ; dsw rA,d(rB)          (both emitted with the second)
//   sw rA,d(rB)   silence state Check  -> vld TMP,d(rB) ; vcmp TMP,rA ; sw
//   sw rA,d(rB)   silence state Squash -> vld TMP,d(rB) ; vtrap TMP,rA
//   anything else                      -> the instruction unchanged
//
// A predicted load pair is tracked for at most the stored distance; an
// intervening instruction that is not an ALU instruction, or that writes the
// base or the first destination, cancels it and the second load is decoded
// unchanged (the dlw still delivers the first word). A held first store is
// released unchanged when the next instruction does not complete the pair or
// when a cycle brings no instruction at all. Combining takes precedence over
// silence squashing for a store. A first instruction whose data register is
// r0 (hard-wired zero) is never combined.
//
// Misprediction recovery: rec_valid (with rec_pc, the PC of the instruction
// whose speculative form failed) flushes the decoder state and output, and
// the next instruction fetched from rec_pc is decoded with no transformation.
// flush alone (e.g. a branch misprediction) clears the state and output.
//
// Event outputs carry one bit per input slot (the slot whose instruction
// completed the pair or was decoded in Check/Squash form or without SD).
//
// The transformations, the 4-wide default and the recovery by re-fetching
// and decoding without transformation follow the original scheme; the
// micro-op set encoding, the output packing, the temporary register and the
// release rules are this design's.
module sd_decoder
  import sd_pkg::*;
#(
  parameter int unsigned FETCH_W = 4,
  parameter int unsigned OUT_W   = 3 * FETCH_W + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // architected instructions
  input  logic       [FETCH_W-1:0]       in_valid,
  input  logic       [FETCH_W-1:0][31:0] in_pc,
  input  logic       [FETCH_W-1:0][31:0] in_inst,
  // predictions for in_pc
  input  logic       [FETCH_W-1:0]       comb_predict,
  input  next_info_t [FETCH_W-1:0]       comb_info,
  input  sil_state_e [FETCH_W-1:0]       sil_state,
  // recovery and flush from the core
  input  logic                          rec_valid,
  input  logic [31:0]                   rec_pc,
  input  logic                          flush,
  // micro-ops to the core
  output logic       [OUT_W-1:0]         out_valid,
  output uop_t       [OUT_W-1:0]         out_uop,
  // event pulses, one bit per input slot
  output logic       [FETCH_W-1:0]       ev_load_comb,
  output logic       [FETCH_W-1:0]       ev_store_comb,
  output logic       [FETCH_W-1:0]       ev_sil_check,
  output logic       [FETCH_W-1:0]       ev_sil_squash,
  output logic       [FETCH_W-1:0]       ev_nosd
);

  // held first store of a predicted store pair
  typedef struct packed {
    logic                valid;
    logic [31:0]         pc;
    logic [31:0]         inst;
  } held_t;

  // outstanding double-word load waiting for its second word
  typedef struct packed {
    logic                valid;
    logic [REG_BITS-1:0] dst1;
    logic [REG_BITS-1:0] base;
    logic [15:0]         off;
    logic [2:0]          left;   // instructions still allowed before the pair
  } pend_t;

  held_t held_q, held_d;
  pend_t pend_q, pend_d;
  logic        nosd_v_q, nosd_v_d;
  logic [31:0] nosd_pc_q;

  logic [OUT_W-1:0]   v_d;
  uop_t [OUT_W-1:0]   u_d;
  logic [FETCH_W-1:0] ld_comb_d, st_comb_d, chk_d, sq_d, nosd_d;

  function automatic uop_t mk(input uop_op_e op, input logic [REG_BITS-1:0] dst,
                              input logic [REG_BITS-1:0] s1, input logic [REG_BITS-1:0] s2,
                              input logic [15:0] imm, input logic [31:0] pc,
                              input logic [31:0] inst);
    uop_t u;
    u.op = op; u.dst = dst; u.src1 = s1; u.src2 = s2; u.imm = imm; u.pc = pc; u.inst = inst;
    return u;
  endfunction

  function automatic uop_t mk_orig(input logic [31:0] pc, input logic [31:0] inst);
    return mk(UOP_ORIG, '0, '0, '0, '0, pc, inst);
  endfunction

  always_comb begin
    int unsigned n;
    held_t held;
    pend_t pend;
    logic  nosd_v;

    held      = held_q;
    pend      = pend_q;
    nosd_v    = nosd_v_q;
    v_d       = '0;
    u_d       = '0;
    ld_comb_d = '0;
    st_comb_d = '0;
    chk_d     = '0;
    sq_d      = '0;
    nosd_d    = '0;
    n         = 0;

    if (in_valid == '0) begin
      // no instruction this cycle: release a held store unchanged
      if (held.valid) begin
        v_d[0] = 1'b1;
        u_d[0] = mk_orig(held.pc, held.inst);
        held.valid = 1'b0;
      end
    end

    for (int s = 0; s < int'(FETCH_W); s++) begin
      logic [31:0] ins, pc;
      logic nosd, done;
      logic [REG_BITS-1:0] rs, rt;
      logic [15:0] imm;
      ins  = in_inst[s];
      pc   = in_pc[s];
      rs   = f_rs(ins);
      rt   = f_rt(ins);
      imm  = f_imm(ins);
      done = 1'b0;
      nosd = in_valid[s] && nosd_v && (pc == nosd_pc_q);

      if (in_valid[s]) begin
        if (nosd) begin
          nosd_v    = 1'b0;
          nosd_d[s] = 1'b1;
        end

        // 1. complete or release a held store
        if (held.valid) begin
          held.valid = 1'b0;
          if (is_sw(ins) && rs == f_rs(held.inst) && imm == f_imm(held.inst) + 16'd4) begin
            v_d[n] = 1'b1;
            u_d[n] = mk(UOP_SETHI, f_rt(held.inst), f_rt(held.inst), rt, '0, pc, ins);
            n++;
            v_d[n] = 1'b1;
            u_d[n] = mk(UOP_DSW, '0, f_rs(held.inst), f_rt(held.inst), f_imm(held.inst),
                        held.pc, held.inst);
            n++;
            st_comb_d[s] = 1'b1;
            done = 1'b1;
          end else begin
            v_d[n] = 1'b1;
            u_d[n] = mk_orig(held.pc, held.inst);
            n++;
          end
        end

        // 2. complete, keep or cancel an outstanding double-word load
        if (!done && pend.valid) begin
          if (is_lw(ins) && rs == pend.base && imm == pend.off + 16'd4) begin
            v_d[n] = 1'b1;
            u_d[n] = mk(UOP_EXTHI, rt, '0, pend.dst1, '0, pc, ins);
            n++;
            pend.valid = 1'b0;
            ld_comb_d[s] = 1'b1;
            done = 1'b1;
          end else if (is_alu(ins) && alu_dst(ins) != pend.base &&
                       alu_dst(ins) != pend.dst1 && pend.left > 3'd1) begin
            pend.left = pend.left - 3'd1;
          end else begin
            pend.valid = 1'b0;
          end
        end

        // 3. translate the instruction itself
        if (!done) begin
          if (!nosd && is_lw(ins) && comb_predict[s] && !comb_info[s].is_store &&
              rt != rs && rt != '0) begin
            v_d[n] = 1'b1;
            u_d[n] = mk(UOP_DLW, rt, rs, '0, imm, pc, ins);
            n++;
            pend.valid = 1'b1;
            pend.dst1  = rt;
            pend.base  = rs;
            pend.off   = imm;
            pend.left  = comb_info[s].distance;
          end else if (!nosd && is_sw(ins) && comb_predict[s] && comb_info[s].is_store &&
                       rt != '0) begin
            held.valid = 1'b1;
            held.pc    = pc;
            held.inst  = ins;
          end else if (!nosd && is_sw(ins) && sil_state[s] == SIL_CHECK) begin
            v_d[n] = 1'b1;
            u_d[n] = mk(UOP_VLD, TMP_REG, rs, '0, imm, pc, ins);
            n++;
            v_d[n] = 1'b1;
            u_d[n] = mk(UOP_VCMP, '0, TMP_REG, rt, '0, pc, ins);
            n++;
            v_d[n] = 1'b1;
            u_d[n] = mk_orig(pc, ins);
            n++;
            chk_d[s] = 1'b1;
          end else if (!nosd && is_sw(ins) && sil_state[s] == SIL_SQUASH) begin
            v_d[n] = 1'b1;
            u_d[n] = mk(UOP_VLD, TMP_REG, rs, '0, imm, pc, ins);
            n++;
            v_d[n] = 1'b1;
            u_d[n] = mk(UOP_VTRAP, '0, TMP_REG, rt, '0, pc, ins);
            n++;
            sq_d[s] = 1'b1;
          end else begin
            v_d[n] = 1'b1;
            u_d[n] = mk_orig(pc, ins);
            n++;
          end
        end
      end
    end

    held_d   = held;
    pend_d   = pend;
    nosd_v_d = nosd_v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_q        <= '0;
      pend_q        <= '0;
      nosd_v_q      <= 1'b0;
      nosd_pc_q     <= '0;
      out_valid     <= '0;
      out_uop       <= '0;
      ev_load_comb  <= '0;
      ev_store_comb <= '0;
      ev_sil_check  <= '0;
      ev_sil_squash <= '0;
      ev_nosd       <= '0;
    end else if (rec_valid || flush) begin
      held_q        <= '0;
      pend_q        <= '0;
      out_valid     <= '0;
      ev_load_comb  <= '0;
      ev_store_comb <= '0;
      ev_sil_check  <= '0;
      ev_sil_squash <= '0;
      ev_nosd       <= '0;
      if (rec_valid) begin
        nosd_v_q  <= 1'b1;
        nosd_pc_q <= rec_pc;
      end
    end else begin
      held_q        <= held_d;
      pend_q        <= pend_d;
      nosd_v_q      <= nosd_v_d;
      out_valid     <= v_d;
      out_uop       <= u_d;
      ev_load_comb  <= ld_comb_d;
      ev_store_comb <= st_comb_d;
      ev_sil_check  <= chk_d;
      ev_sil_squash <= sq_d;
      ev_nosd       <= nosd_d;
    end
  end

endmodule
