// Self-checking testbench for sd_decoder.
//
// Part 1 drives one architected instruction per cycle in slot 0 together
// with hand-set predictions and checks the micro-ops that appear one cycle
// later against the expected translation: plain decode, load combining (adjacent and with
// ALU instructions in between), cancelled load pairs, store combining, a
// held store released by a non-matching instruction or by an empty cycle,
// the Check and Squash forms of a store, decode without transformation after
// a recovery, and a flush discarding a held store. Part 2 drives whole
// groups: a pair inside one group, a pair split across groups, and the
// largest output (a released store followed by four Check-form stores).
// Part 3 decodes a random stream with random predictions twice, once one
// instruction per cycle and once in random groups with random empty slots,
// and requires the same micro-op sequence and event counts.
module tb_sd_decoder;
  import sd_pkg::*;

  localparam int FETCH_W = 4;
  localparam int OUT_W   = 3 * FETCH_W + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic       [FETCH_W-1:0]       in_valid = '0;
  logic       [FETCH_W-1:0][31:0] in_pc = '0, in_inst = '0;
  logic       [FETCH_W-1:0]       comb_predict = '0;
  next_info_t [FETCH_W-1:0]       comb_info = '0;
  sil_state_e [FETCH_W-1:0]       sil_state = {FETCH_W{SIL_NO_SQUASH}};
  logic        rec_valid = 1'b0, flush = 1'b0;
  logic [31:0] rec_pc = '0;
  logic [OUT_W-1:0]  out_valid;
  uop_t [OUT_W-1:0]  out_uop;
  logic [FETCH_W-1:0] ev_load_comb, ev_store_comb, ev_sil_check, ev_sil_squash, ev_nosd;

  int checks = 0, failures = 0;
  int n_ld = 0, n_st = 0, n_chk = 0, n_sq = 0, n_nosd = 0;

  sd_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_ld  += $countones(ev_load_comb);
    n_st  += $countones(ev_store_comb);
    n_chk += $countones(ev_sil_check);
    n_sq  += $countones(ev_sil_squash);
    n_nosd += $countones(ev_nosd);
  end

  // part 3: every valid output micro-op, in slot order
  bit   collect = 0;
  uop_t got_q [$];
  always @(posedge clk) if (rst_n && collect)
    for (int k = 0; k < OUT_W; k++) if (out_valid[k]) got_q.push_back(out_uop[k]);

  function automatic logic [31:0] lw(input int rt, input int off, input int base);
    return enc_mem(OP_LW, 5'(base), 5'(rt), 16'(off));
  endfunction
  function automatic logic [31:0] sw(input int rt, input int off, input int base);
    return enc_mem(OP_SW, 5'(base), 5'(rt), 16'(off));
  endfunction
  function automatic logic [31:0] addu(input int rd, input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h21};
  endfunction
  function automatic logic [31:0] beq(input int rs, input int rt);
    return {6'h04, 5'(rs), 5'(rt), 16'd4};
  endfunction

  function automatic uop_t u(input uop_op_e op, input int dst, input int s1, input int s2,
                             input int imm, input logic [31:0] pc, input logic [31:0] inst);
    uop_t x;
    x.op = op; x.dst = 6'(dst); x.src1 = 6'(s1); x.src2 = 6'(s2);
    x.imm = 16'(imm); x.pc = pc; x.inst = inst;
    return x;
  endfunction
  function automatic uop_t orig(input logic [31:0] pc, input logic [31:0] inst);
    return u(UOP_ORIG, 0, 0, 0, 0, pc, inst);
  endfunction

  uop_t exp_q [$];
  logic [31:0] pc = 32'h0040_0000;

  // compare the registered output with the queued expectation
  task automatic check_out(input string what);
    int k;
    logic bad;
    checks++;
    bad = 1'b0;
    for (k = 0; k < OUT_W; k++) begin
      if (k < exp_q.size()) begin
        if (!out_valid[k] || out_uop[k] != exp_q[k]) bad = 1'b1;
      end else if (out_valid[k]) bad = 1'b1;
    end
    if (bad) begin
      failures++;
      $display("FAIL %s: valid=%b", what, out_valid);
      for (k = 0; k < OUT_W; k++)
        $display("   got %s d%0d s%0d s%0d imm%0d pc=%h | exp %s",
                 out_uop[k].op.name(), out_uop[k].dst, out_uop[k].src1, out_uop[k].src2,
                 out_uop[k].imm, out_uop[k].pc,
                 (k < exp_q.size()) ? exp_q[k].op.name() : "-");
    end
    exp_q.delete();
  endtask

  // Drive one instruction in slot 0 (or an empty group when inst_v is 0),
  // then check the output.
  task automatic step(input logic inst_v, input logic [31:0] inst, input logic cp,
                      input next_info_t ci, input sil_state_e ss, input string what);
    @(negedge clk);
    in_valid = '0; comb_predict = '0; comb_info = '0;
    sil_state = {FETCH_W{SIL_NO_SQUASH}};
    in_valid[0] = inst_v; in_pc[0] = pc; in_inst[0] = inst;
    comb_predict[0] = cp; comb_info[0] = ci; sil_state[0] = ss;
    if (inst_v) pc += 4;
    @(posedge clk);
    #1;
    in_valid = '0;
    check_out(what);
  endtask

  // group being assembled for gstep
  logic       [FETCH_W-1:0]       g_v;
  logic       [FETCH_W-1:0][31:0] g_i;
  logic       [FETCH_W-1:0]       g_cp;
  next_info_t [FETCH_W-1:0]       g_ci;
  sil_state_e [FETCH_W-1:0]       g_ss;

  task automatic gclear();
    g_v = '0; g_i = '0; g_cp = '0; g_ci = '0; g_ss = {FETCH_W{SIL_NO_SQUASH}};
  endtask

  // put an instruction in slot s of the group; returns its PC
  function automatic logic [31:0] gput(input int s, input logic [31:0] inst, input logic cp,
                                       input next_info_t ci, input sil_state_e ss);
    g_v[s] = 1'b1; g_i[s] = inst; g_cp[s] = cp; g_ci[s] = ci; g_ss[s] = ss;
    return pc + 32'(4 * s);
  endfunction

  task automatic gstep(input string what);
    @(negedge clk);
    in_valid = g_v; in_inst = g_i; comb_predict = g_cp; comb_info = g_ci; sil_state = g_ss;
    for (int s = 0; s < FETCH_W; s++) in_pc[s] = pc + 32'(4 * s);
    pc += 32'(4 * $countones(g_v));
    @(posedge clk);
    #1;
    in_valid = '0;
    check_out(what);
  endtask

  localparam next_info_t NONE = '0;
  function automatic next_info_t ld(input int d);
    next_info_t i;
    i.is_store = 1'b0; i.distance = 3'(d);
    return i;
  endfunction
  localparam next_info_t ST = '{is_store: 1'b1, distance: 3'd1};

  logic [31:0] p0, p1, i0, i1;

  // part 3 stream and the one-at-a-time result
  localparam int NSTREAM = 3000;
  logic [31:0] r_i [NSTREAM];
  logic        r_cp [NSTREAM];
  next_info_t  r_ci [NSTREAM];
  sil_state_e  r_ss [NSTREAM];
  uop_t        ref_q [$];
  int          ref_ev [2];

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // plain ALU instruction
    i0 = addu(3, 4, 5);
    exp_q.push_back(orig(pc, i0));
    step(1, i0, 0, NONE, SIL_NO_SQUASH, "plain");

    // adjacent load pair
    p0 = pc; i0 = lw(1, 0, 10);
    exp_q.push_back(u(UOP_DLW, 1, 10, 0, 0, p0, i0));
    step(1, i0, 1, ld(1), SIL_NO_SQUASH, "dlw");
    p1 = pc; i1 = lw(2, 4, 10);
    exp_q.push_back(u(UOP_EXTHI, 2, 0, 1, 0, p1, i1));
    step(1, i1, 0, NONE, SIL_NO_SQUASH, "exthi");

    // load pair with two ALU instructions in between
    i0 = lw(5, 16, 11);
    exp_q.push_back(u(UOP_DLW, 5, 11, 0, 16, pc, i0));
    step(1, i0, 1, ld(3), SIL_NO_SQUASH, "dlw gap");
    i0 = addu(6, 7, 8);
    exp_q.push_back(orig(pc, i0));
    step(1, i0, 0, NONE, SIL_NO_SQUASH, "alu in gap");
    i0 = addu(9, 6, 6);
    exp_q.push_back(orig(pc, i0));
    step(1, i0, 0, NONE, SIL_NO_SQUASH, "alu in gap 2");
    i0 = lw(12, 20, 11);
    exp_q.push_back(u(UOP_EXTHI, 12, 0, 5, 0, pc, i0));
    step(1, i0, 0, NONE, SIL_NO_SQUASH, "exthi gap");

    // load pair cancelled by a branch: the second load is decoded unchanged
    i0 = lw(1, 0, 10);
    exp_q.push_back(u(UOP_DLW, 1, 10, 0, 0, pc, i0));
    step(1, i0, 1, ld(2), SIL_NO_SQUASH, "dlw cancelled");
    i0 = beq(1, 2);
    exp_q.push_back(orig(pc, i0));
    step(1, i0, 0, NONE, SIL_NO_SQUASH, "branch");
    i0 = lw(2, 4, 10);
    exp_q.push_back(orig(pc, i0));
    step(1, i0, 0, NONE, SIL_NO_SQUASH, "second load unchanged");

    // a load that overwrites its base is never combined
    i0 = lw(10, 0, 10);
    exp_q.push_back(orig(pc, i0));
    step(1, i0, 1, ld(1), SIL_NO_SQUASH, "load writes base");

    // store pair (word-aligned base): sethi + dsw with the second store
    p0 = pc; i0 = sw(2, 4, 10);
    step(1, i0, 1, ST, SIL_NO_SQUASH, "first store held");
    p1 = pc; i1 = sw(3, 8, 10);
    exp_q.push_back(u(UOP_SETHI, 2, 2, 3, 0, p1, i1));
    exp_q.push_back(u(UOP_DSW, 0, 10, 2, 4, p0, i0));
    step(1, i1, 0, NONE, SIL_CHECK, "sethi+dsw");

    // held store released by an ALU instruction
    p0 = pc; i0 = sw(2, 4, 10);
    step(1, i0, 1, ST, SIL_NO_SQUASH, "held again");
    p1 = pc; i1 = addu(1, 1, 1);
    exp_q.push_back(orig(p0, i0));
    exp_q.push_back(orig(p1, i1));
    step(1, i1, 0, NONE, SIL_NO_SQUASH, "released by alu");

    // held store released by an empty cycle
    p0 = pc; i0 = sw(2, 4, 10);
    step(1, i0, 1, ST, SIL_NO_SQUASH, "held");
    exp_q.push_back(orig(p0, i0));
    step(0, '0, 0, NONE, SIL_NO_SQUASH, "released by bubble");

    // held store released by a non-matching store in Check state: 4 micro-ops
    p0 = pc; i0 = sw(2, 4, 10);
    step(1, i0, 1, ST, SIL_NO_SQUASH, "held");
    p1 = pc; i1 = sw(7, 0, 20);
    exp_q.push_back(orig(p0, i0));
    exp_q.push_back(u(UOP_VLD, 32, 20, 0, 0, p1, i1));
    exp_q.push_back(u(UOP_VCMP, 0, 32, 7, 0, p1, i1));
    exp_q.push_back(orig(p1, i1));
    step(1, i1, 0, NONE, SIL_CHECK, "released + check");

    // squash form
    p1 = pc; i1 = sw(7, 12, 20);
    exp_q.push_back(u(UOP_VLD, 32, 20, 0, 12, p1, i1));
    exp_q.push_back(u(UOP_VTRAP, 0, 32, 7, 0, p1, i1));
    step(1, i1, 0, NONE, SIL_SQUASH, "squash");

    // recovery: the re-fetched store is decoded unchanged once
    @(negedge clk); rec_valid = 1'b1; rec_pc = p1;
    @(negedge clk); rec_valid = 1'b0;
    pc = p1;
    exp_q.push_back(orig(p1, i1));
    step(1, i1, 0, NONE, SIL_SQUASH, "no SD after recovery");
    pc = p1;
    exp_q.push_back(u(UOP_VLD, 32, 20, 0, 12, p1, i1));
    exp_q.push_back(u(UOP_VTRAP, 0, 32, 7, 0, p1, i1));
    step(1, i1, 0, NONE, SIL_SQUASH, "SD again afterwards");

    // recovery of a combined load
    p0 = pc; i0 = lw(1, 0, 10);
    @(negedge clk); rec_valid = 1'b1; rec_pc = p0;
    @(negedge clk); rec_valid = 1'b0;
    exp_q.push_back(orig(p0, i0));
    step(1, i0, 1, ld(1), SIL_NO_SQUASH, "load after recovery");
    i1 = lw(2, 4, 10);
    exp_q.push_back(orig(pc, i1));
    step(1, i1, 0, NONE, SIL_NO_SQUASH, "second load after recovery");

    // flush drops a held store
    i0 = sw(2, 4, 10);
    step(1, i0, 1, ST, SIL_NO_SQUASH, "held before flush");
    @(negedge clk); flush = 1'b1;
    @(negedge clk); flush = 1'b0;
    i1 = addu(1, 2, 3);
    exp_q.push_back(orig(pc, i1));
    step(1, i1, 0, NONE, SIL_NO_SQUASH, "after flush");

    // ---------------- Part 2: whole groups
    // load pair inside one group, then an ALU op and a store pair
    gclear();
    p0 = gput(0, lw(1, 0, 10), 1, ld(2), SIL_NO_SQUASH);
    p1 = gput(1, addu(6, 7, 8), 0, NONE, SIL_NO_SQUASH);
    i0 = lw(1, 0, 10);
    exp_q.push_back(u(UOP_DLW, 1, 10, 0, 0, p0, i0));
    exp_q.push_back(orig(p1, addu(6, 7, 8)));
    p1 = gput(2, lw(2, 4, 10), 0, NONE, SIL_NO_SQUASH);
    exp_q.push_back(u(UOP_EXTHI, 2, 0, 1, 0, p1, lw(2, 4, 10)));
    p0 = gput(3, sw(4, 8, 10), 1, ST, SIL_CHECK);
    gstep("load pair in a group, store held in slot 3");
    // the held store pairs with slot 0 of the next group
    gclear();
    p1 = gput(0, sw(5, 12, 10), 0, NONE, SIL_NO_SQUASH);
    exp_q.push_back(u(UOP_SETHI, 4, 4, 5, 0, p1, sw(5, 12, 10)));
    exp_q.push_back(u(UOP_DSW, 0, 10, 4, 8, p0, sw(4, 8, 10)));
    p1 = gput(1, sw(3, 0, 11), 0, NONE, SIL_SQUASH);
    exp_q.push_back(u(UOP_VLD, 32, 11, 0, 0, p1, sw(3, 0, 11)));
    exp_q.push_back(u(UOP_VTRAP, 0, 32, 3, 0, p1, sw(3, 0, 11)));
    gstep("store pair across groups, squash in slot 1");
    // a store held in slot 0 released by slot 2 (slot 1 empty)
    gclear();
    p0 = gput(0, sw(4, 0, 12), 1, ST, SIL_NO_SQUASH);
    p1 = gput(2, addu(1, 1, 1), 0, NONE, SIL_NO_SQUASH);
    exp_q.push_back(orig(p0, sw(4, 0, 12)));
    exp_q.push_back(orig(p1, addu(1, 1, 1)));
    gstep("held store released inside a group");
    // largest output: a held store released, then four Check-form stores
    gclear();
    p0 = gput(0, sw(4, 0, 12), 1, ST, SIL_NO_SQUASH);
    gstep("held for the largest group");
    gclear();
    exp_q.push_back(orig(p0, sw(4, 0, 12)));
    for (int s = 0; s < FETCH_W; s++) begin
      i1 = sw(s + 1, 64 + 8 * s, 13);
      p1 = gput(s, i1, 0, NONE, SIL_CHECK);
      exp_q.push_back(u(UOP_VLD, 32, 13, 0, 64 + 8 * s, p1, i1));
      exp_q.push_back(u(UOP_VCMP, 0, 32, s + 1, 0, p1, i1));
      exp_q.push_back(orig(p1, i1));
    end
    gstep("all output slots used");
    repeat (2) @(negedge clk);

    checks++;
    if (n_ld != 3 || n_st != 2 || n_chk != 5 || n_sq != 3 || n_nosd != 2) begin
      failures++;
      $display("FAIL event counts ld=%0d st=%0d chk=%0d sq=%0d nosd=%0d", n_ld, n_st, n_chk, n_sq, n_nosd);
    end

    // ---------------- Part 3: grouped decode equals one-at-a-time decode
    for (int n = 0; n < NSTREAM; n++) begin
      int kind, b, rt, off;
      b   = 10 + int'($urandom % 2);
      rt  = int'($urandom % 6);
      off = 4 * int'($urandom % 4);
      kind = int'($urandom % 8);
      if (n == NSTREAM - 1) kind = 7;    // end on an ALU op: nothing left held
      r_i[n] = (kind < 3) ? lw(rt, off, b) :
               (kind < 6) ? sw(rt, off, b) :
               (kind == 6) ? beq(1, 2) : addu(int'($urandom % 4) + 1, 7, 8);
      r_cp[n] = ($urandom % 2) == 0;
      r_ci[n].is_store = ($urandom % 4) != 0 ? (kind >= 3 && kind < 6) : 1'($urandom);
      r_ci[n].distance = 3'(1 + $urandom % 3);
      r_ss[n] = sil_state_e'($urandom % 3);
    end
    for (int mode = 0; mode < 2; mode++) begin
      int k, ev[2];
      k = 0;
      n_ld = 0; n_st = 0; n_chk = 0; n_sq = 0;
      @(negedge clk); flush = 1'b1;
      @(negedge clk); flush = 1'b0;
      collect = 1;
      while (k < NSTREAM) begin
        int width;
        width = (mode == 0) ? 1 : 1 + int'($urandom % FETCH_W);
        gclear();
        for (int s = 0; s < width && k < NSTREAM; s++) begin
          // random empty slots, but never an empty group
          if (mode == 0 || s == 0 || ($urandom % 5) != 0) begin
            void'(gput(s, r_i[k], r_cp[k], r_ci[k], r_ss[k]));
            k++;
          end
        end
        @(negedge clk);
        in_valid = g_v; in_inst = g_i; comb_predict = g_cp; comb_info = g_ci; sil_state = g_ss;
        begin
          int j;
          j = k - $countones(g_v);
          for (int s = 0; s < FETCH_W; s++) begin
            in_pc[s] = 32'h0050_0000 + 32'(4 * j);
            if (g_v[s]) j++;
          end
        end
      end
      @(negedge clk);
      in_valid = '0;
      repeat (3) @(negedge clk);
      collect = 0;
      ev[0] = n_ld + 100000 * n_st;
      ev[1] = n_chk + 100000 * n_sq;
      if (mode == 0) begin
        ref_q = got_q;
        ref_ev = ev;
      end else begin
        checks++;
        if (got_q.size() != ref_q.size() || ref_q.size() < NSTREAM) begin
          failures++;
          $display("FAIL grouped decode gave %0d micro-ops, one at a time %0d",
                   got_q.size(), ref_q.size());
        end else begin
          foreach (ref_q[j]) begin
            checks++;
            if (got_q[j] != ref_q[j]) begin
              failures++;
              $display("FAIL micro-op %0d: grouped %s pc=%h, one at a time %s pc=%h", j,
                       got_q[j].op.name(), got_q[j].pc, ref_q[j].op.name(), ref_q[j].pc);
            end
          end
        end
        checks++;
        if (ev != ref_ev) begin
          failures++;
          $display("FAIL grouped event counts differ");
        end
        $display("random stream: %0d instructions, %0d micro-ops, %0d load pairs, %0d store pairs, %0d check, %0d squash",
                 NSTREAM, ref_q.size(), ref_ev[0] % 100000, ref_ev[0] / 100000,
                 ref_ev[1] % 100000, ref_ev[1] / 100000);
      end
      got_q.delete();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
