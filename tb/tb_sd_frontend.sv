// End-to-end testbench for sd_frontend, at the default parameters.
//
// The testbench plays both neighbours of the front end:
//  * fetch: it runs a small loop program on a golden architected model first,
//    records the dynamic instruction stream, and feeds it in groups of up to
//    FETCH_W instructions (mostly full groups, sometimes shorter ones); after
//    a recovery it re-feeds from the instruction that failed. Fetch pauses
//    while the core's training reports are queued up, since each training
//    port takes one report per cycle;
//  * core: it executes the micro-ops in order on a model with 64-bit
//    registers, a temporary register and a word memory, raises a trap for an
//    unaligned dlw/dsw or a failing vtrap, and returns the alignment, store
//    value and verify outcomes to the predictors.
// At the end the architected registers and memory of the core model must
// equal the golden model's. The program contains an always-aligned load pair,
// a load pair with an ALU instruction between whose alignment alternates, a
// store pair, a store that is usually silent and is occasionally made
// non-silent by another store, and a periodic shift of the load and store
// bases that makes aligned pairs unaligned. Each mechanism (allocation, load
// and store combining, Check, Squash, the three kinds of misprediction and
// decoding without transformation after recovery) must occur at least once.
module tb_sd_frontend;
  import sd_pkg::*;

  localparam int MAXTRACE = 40000;
  localparam int MEMW     = 4096;          // words of data memory
  localparam logic [31:0] DBASE = 32'h1000_0000;
  localparam int ITER     = 300;
  localparam int FETCH_W  = 4;
  localparam int OUT_W    = 3 * FETCH_W + 1;
  localparam int FB_LIMIT = 6;             // queued reports that pause fetch

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [FETCH_W-1:0]       in_valid = '0;
  logic [FETCH_W-1:0][31:0] in_pc = '0, in_inst = '0;
  logic        up_valid = 1'b0, up_aligned = 1'b0;
  logic [31:0] up_pc = '0;
  logic        tr_valid = 1'b0;
  logic [31:0] tr_pc = '0, tr_value = '0;
  logic        vf_valid = 1'b0, vf_silent = 1'b0;
  logic [31:0] vf_pc = '0;
  logic        rec_valid = 1'b0, flush = 1'b0;
  logic [31:0] rec_pc = '0;
  logic [OUT_W-1:0] out_valid;
  uop_t [OUT_W-1:0] out_uop;
  logic [FETCH_W-1:0] ev_alloc, ev_load_comb, ev_store_comb, ev_sil_check, ev_sil_squash,
                      ev_nosd;

  sd_frontend dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ event counts
  int n_alloc = 0, n_ldc = 0, n_stc = 0, n_chk = 0, n_sq = 0, n_nosd = 0;
  int n_trap_dlw = 0, n_trap_dsw = 0, n_trap_sil = 0;
  int n_group = 0, n_full = 0, n_stall = 0, max_uops = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    n_alloc += $countones(ev_alloc);
    n_ldc   += $countones(ev_load_comb);
    n_stc   += $countones(ev_store_comb);
    n_chk   += $countones(ev_sil_check);
    n_sq    += $countones(ev_sil_squash);
    n_nosd  += $countones(ev_nosd);
    n_group += int'(in_valid != '0);
    n_full  += int'(&in_valid);
  end

  // ------------------------------------------------------------ program
  function automatic logic [31:0] i_lw(input int rt, input int off, input int base);
    return enc_mem(OP_LW, 5'(base), 5'(rt), 16'(off));
  endfunction
  function automatic logic [31:0] i_sw(input int rt, input int off, input int base);
    return enc_mem(OP_SW, 5'(base), 5'(rt), 16'(off));
  endfunction
  function automatic logic [31:0] i_addu(input int rd, input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h21};
  endfunction
  function automatic logic [31:0] i_addiu(input int rt, input int rs, input int imm);
    return {6'h09, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] i_andi(input int rt, input int rs, input int imm);
    return {6'h0c, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] i_lui(input int rt, input int imm);
    return {6'h0f, 5'd0, 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] i_bne(input int rs, input int rt, input int off);
    return {6'h05, 5'(rs), 5'(rt), 16'(off)};
  endfunction
  localparam logic [31:0] HALT = 32'hffff_ffff;
  localparam logic [31:0] PC0  = 32'h0040_0000;

  logic [31:0] prog [64];
  int plen;

  task automatic build_program();
    int k;
    k = 0;
    prog[k++] = i_lui(10, 16'h1000);                 // r10: aligned load base
    prog[k++] = i_lui(11, 16'h1000);
    prog[k++] = i_addiu(11, 11, 16'h1004);           // r11: word-aligned load base
    prog[k++] = i_lui(12, 16'h1000);
    prog[k++] = i_addiu(12, 12, 16'h2000);           // r12: store base
    prog[k++] = i_lui(13, 16'h1000);
    prog[k++] = i_addiu(13, 13, 16'h3000);           // r13: silent location
    prog[k++] = i_addiu(5, 0, 7);                    // r5 = 7
    prog[k++] = i_addiu(20, 0, ITER);                // loop counter
    // loop: (index 9)
    prog[k++] = i_lw(1, 0, 10);
    prog[k++] = i_lw(2, 4, 10);                      // pair, distance 1
    prog[k++] = i_addu(3, 1, 2);
    prog[k++] = i_lw(4, 0, 11);
    prog[k++] = i_addiu(6, 6, 1);
    prog[k++] = i_lw(7, 4, 11);                      // pair, distance 2
    prog[k++] = i_addu(3, 3, 4);
    prog[k++] = i_addu(3, 3, 7);
    prog[k++] = i_sw(3, 0, 12);
    prog[k++] = i_sw(1, 4, 12);                      // store pair
    prog[k++] = i_sw(5, 0, 13);                      // usually silent store
    prog[k++] = i_andi(8, 20, 7);
    prog[k++] = i_bne(8, 0, 1);
    prog[k++] = i_sw(20, 0, 13);                     // every 8th iteration
    prog[k++] = i_andi(9, 20, 31);
    prog[k++] = i_bne(9, 0, 2);
    prog[k++] = i_addiu(10, 10, 4);                  // every 32nd iteration:
    prog[k++] = i_addiu(12, 12, 4);                  // shift the alignment
    prog[k++] = i_addiu(10, 10, 8);
    prog[k++] = i_addiu(11, 11, 4);
    prog[k++] = i_addiu(12, 12, 8);
    prog[k++] = i_addiu(20, 20, -1);
    prog[k] = i_bne(20, 0, 9 - (k + 1));
    k++;
    prog[k++] = HALT;
    plen = k;
  endtask

  // ------------------------------------------------------------ golden model
  logic [31:0] g_reg [32];
  logic [31:0] g_mem [MEMW];
  logic [31:0] t_pc [MAXTRACE];
  logic [31:0] t_inst [MAXTRACE];
  int tlen;

  function automatic int widx(input logic [31:0] a);
    return int'(a[13:2]);
  endfunction

  function automatic logic [31:0] sext(input logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  task automatic run_golden();
    logic [31:0] pc, ins, a;
    for (int i = 0; i < 32; i++) g_reg[i] = '0;
    for (int i = 0; i < MEMW; i++) g_mem[i] = 32'(i * 3 + 1);
    pc = PC0;
    tlen = 0;
    forever begin
      ins = prog[(pc - PC0) >> 2];
      if (ins == HALT || tlen == MAXTRACE) break;
      t_pc[tlen] = pc; t_inst[tlen] = ins; tlen++;
      pc += 4;
      a = g_reg[ins[25:21]] + sext(ins[15:0]);
      case (ins[31:26])
        OP_LW:  g_reg[ins[20:16]] = g_mem[widx(a)];
        OP_SW:  g_mem[widx(a)] = g_reg[ins[20:16]];
        6'h09:  g_reg[ins[20:16]] = a;
        6'h0c:  g_reg[ins[20:16]] = g_reg[ins[25:21]] & {16'h0, ins[15:0]};
        6'h0f:  g_reg[ins[20:16]] = {ins[15:0], 16'h0};
        6'h05:  if (g_reg[ins[25:21]] != g_reg[ins[20:16]]) pc = pc + (sext(ins[15:0]) << 2);
        6'h00:  g_reg[ins[15:11]] = g_reg[ins[25:21]] + g_reg[ins[20:16]];
        default: ;
      endcase
      g_reg[0] = '0;
    end
  endtask

  // ------------------------------------------------------------ core model
  logic [63:0] c_reg [33];
  logic [31:0] c_mem [MEMW];

  typedef struct packed { logic [31:0] pc; logic [31:0] v; logic b; } fb_t;
  fb_t q_up [$], q_tr [$], q_vf [$];

  function automatic void wr(input logic [5:0] r, input logic [63:0] v);
    if (r != 6'd0) c_reg[r] = v;
  endfunction

  // Executes one micro-op; returns 1 on a trap.
  function automatic logic exec(input uop_t u);
    logic [31:0] ins, a;
    logic silent;
    ins = u.inst;
    case (u.op)
      UOP_ORIG: begin
        a = c_reg[ins[25:21]][31:0] + sext(ins[15:0]);
        case (ins[31:26])
          OP_LW: begin
            wr({1'b0, ins[20:16]}, {32'h0, c_mem[widx(a)]});
            q_up.push_back('{pc: u.pc, v: '0, b: (a[2:0] == 3'd0)});
          end
          OP_SW: begin
            c_mem[widx(a)] = c_reg[ins[20:16]][31:0];
            q_up.push_back('{pc: u.pc, v: '0, b: (a[2:0] == 3'd0)});
            q_tr.push_back('{pc: u.pc, v: c_reg[ins[20:16]][31:0], b: 1'b0});
          end
          6'h09: wr({1'b0, ins[20:16]}, {32'h0, a});
          6'h0c: wr({1'b0, ins[20:16]}, {32'h0, c_reg[ins[25:21]][31:0] & {16'h0, ins[15:0]}});
          6'h0f: wr({1'b0, ins[20:16]}, {32'h0, ins[15:0], 16'h0});
          6'h00: wr({1'b0, ins[15:11]}, {32'h0, c_reg[ins[25:21]][31:0] + c_reg[ins[20:16]][31:0]});
          default: ;   // branches: the fetch side follows the recorded path
        endcase
      end
      UOP_DLW: begin
        a = c_reg[u.src1][31:0] + sext(u.imm);
        q_up.push_back('{pc: u.pc, v: '0, b: (a[2:0] == 3'd0)});
        if (a[2:0] != 3'd0) begin n_trap_dlw++; return 1'b1; end
        wr(u.dst, {c_mem[widx(a + 4)], c_mem[widx(a)]});
      end
      UOP_EXTHI: wr(u.dst, {32'h0, c_reg[u.src2][63:32]});
      UOP_SETHI: wr(u.dst, {c_reg[u.src2][31:0], c_reg[u.src1][31:0]});
      UOP_DSW: begin
        a = c_reg[u.src1][31:0] + sext(u.imm);
        q_up.push_back('{pc: u.pc, v: '0, b: (a[2:0] == 3'd0)});
        if (a[2:0] != 3'd0) begin n_trap_dsw++; return 1'b1; end
        c_mem[widx(a)]     = c_reg[u.src2][31:0];
        c_mem[widx(a + 4)] = c_reg[u.src2][63:32];
      end
      UOP_VLD: begin
        a = c_reg[u.src1][31:0] + sext(u.imm);
        c_reg[TMP_REG] = {32'h0, c_mem[widx(a)]};
      end
      UOP_VCMP: begin
        silent = c_reg[u.src1][31:0] == c_reg[u.src2][31:0];
        q_vf.push_back('{pc: u.pc, v: '0, b: silent});
      end
      UOP_VTRAP: begin
        silent = c_reg[u.src1][31:0] == c_reg[u.src2][31:0];
        q_vf.push_back('{pc: u.pc, v: '0, b: silent});
        if (!silent) begin n_trap_sil++; return 1'b1; end
        q_tr.push_back('{pc: u.pc, v: c_reg[u.src2][31:0], b: 1'b0});
      end
      default: begin
        failures++;
        $display("FAIL unknown micro-op %0d", u.op);
      end
    endcase
    return 1'b0;
  endfunction

  // drive one entry of each feedback queue (called at a negative edge)
  task automatic drive_feedback();
    fb_t f;
    up_valid = 1'b0; tr_valid = 1'b0; vf_valid = 1'b0;
    if (q_up.size() > 0) begin f = q_up.pop_front(); up_valid = 1'b1; up_pc = f.pc; up_aligned = f.b; end
    if (q_tr.size() > 0) begin f = q_tr.pop_front(); tr_valid = 1'b1; tr_pc = f.pc; tr_value = f.v; end
    if (q_vf.size() > 0) begin f = q_vf.pop_front(); vf_valid = 1'b1; vf_pc = f.pc; vf_silent = f.b; end
  endtask

  // returns 1 and the PC of the failing micro-op on a trap
  task automatic execute_outputs(output logic trap, output logic [31:0] tpc);
    trap = 1'b0;
    tpc = '0;
    if ($countones(out_valid) > max_uops) max_uops = $countones(out_valid);
    for (int k = 0; k < OUT_W; k++) begin
      if (!trap && out_valid[k]) begin
        if (exec(out_uop[k])) begin
          trap = 1'b1;
          tpc = out_uop[k].pc;
        end
      end
    end
  endtask

  // ------------------------------------------------------------ main
  int fed_idx [$];
  logic [31:0] fed_pc [$];

  initial begin
    int idx, drain;
    logic trap;
    logic [31:0] tpc;

    build_program();
    run_golden();
    for (int i = 0; i < 33; i++) c_reg[i] = '0;
    for (int i = 0; i < MEMW; i++) c_mem[i] = 32'(i * 3 + 1);
    $display("program: %0d static, %0d dynamic instructions", plen, tlen);

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    idx = 0;
    drain = 0;
    while (idx < tlen || drain < 4) begin
      @(negedge clk);
      rec_valid = 1'b0;
      drive_feedback();
      in_valid = '0;
      if (idx < tlen && (q_up.size() > FB_LIMIT || q_tr.size() > FB_LIMIT ||
                         q_vf.size() > FB_LIMIT)) begin
        n_stall++;
      end else if (idx < tlen) begin
        int width;
        width = ($urandom % 4 == 0) ? 1 + int'($urandom % FETCH_W) : FETCH_W;
        for (int s = 0; s < width && idx < tlen; s++) begin
          in_valid[s] = 1'b1; in_pc[s] = t_pc[idx]; in_inst[s] = t_inst[idx];
          fed_idx.push_back(idx); fed_pc.push_back(t_pc[idx]);
          if (fed_idx.size() > 4 * FETCH_W) begin
            void'(fed_idx.pop_front()); void'(fed_pc.pop_front());
          end
          idx++;
        end
      end else begin
        drain++;
      end
      @(posedge clk);
      #1;
      execute_outputs(trap, tpc);
      if (trap) begin
        int back;
        back = -1;
        for (int j = fed_pc.size() - 1; j >= 0; j--)
          if (back < 0 && fed_pc[j] == tpc) back = fed_idx[j];
        checks++;
        if (back < 0) begin
          failures++;
          $display("FAIL trap PC %h not among recently fed instructions", tpc);
          break;
        end
        @(negedge clk);
        drive_feedback();
        in_valid = '0;
        rec_valid = 1'b1; rec_pc = tpc;
        idx = back;
        drain = 0;
        fed_idx.delete(); fed_pc.delete();
      end
    end
    @(negedge clk);
    rec_valid = 1'b0; in_valid = '0;
    while (q_up.size() > 0 || q_tr.size() > 0 || q_vf.size() > 0) begin
      @(negedge clk);
      drive_feedback();
    end
    @(negedge clk);
    drive_feedback();

    // architected state must match
    for (int r = 1; r < 32; r++) begin
      checks++;
      if (c_reg[r][31:0] != g_reg[r]) begin
        failures++;
        $display("FAIL r%0d = %h, expected %h", r, c_reg[r][31:0], g_reg[r]);
      end
    end
    begin
      int bad;
      bad = 0;
      for (int w = 0; w < MEMW; w++) if (c_mem[w] != g_mem[w]) bad++;
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL %0d memory words differ", bad);
      end
    end

    $display("cycles=%0d for %0d instructions: %0d groups (%0d full), %0d fetch pauses, at most %0d micro-ops in a cycle",
             cycles, tlen, n_group, n_full, n_stall, max_uops);
    $display("allocations=%0d load pairs=%0d store pairs=%0d check=%0d squash=%0d",
             n_alloc, n_ldc, n_stc, n_chk, n_sq);
    $display("traps: dlw=%0d dsw=%0d silence=%0d; decoded without SD=%0d",
             n_trap_dlw, n_trap_dsw, n_trap_sil, n_nosd);
    begin
      int ev [9];
      string nm [9];
      ev = '{n_alloc, n_ldc, n_stc, n_chk, n_sq, n_trap_dlw, n_trap_dsw, n_trap_sil, n_nosd};
      nm = '{"allocation", "load combining", "store combining", "check", "squash",
             "dlw misprediction", "dsw misprediction", "silence misprediction", "recovery decode"};
      for (int e = 0; e < 9; e++) begin
        checks++;
        if (ev[e] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", nm[e]);
        end
      end
      // every recovery must decode the re-fetched instruction unchanged
      checks++;
      if (n_nosd != n_trap_dlw + n_trap_dsw + n_trap_sil) begin
        failures++;
        $display("FAIL %0d recoveries but %0d traps", n_nosd, n_trap_dlw + n_trap_dsw + n_trap_sil);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
