// Self-checking testbench for sequence_detector.
//
// Builds a stream of short instruction sequences and replays it three times:
// one instruction per cycle, in groups of random size with random empty
// slots, and in full groups of FETCH_W. Each time it checks which pairs are
// reported, in program order (PC of the first instruction, kind and distance),
// including the rejections: offsets not 4 apart, different base, first load
// overwriting the base, a store pair interrupted by an ALU instruction, a load
// pair interrupted by a branch or by an ALU instruction writing the base, and
// a gap beyond the window.
module tb_sequence_detector;
  import sd_pkg::*;

  localparam int FETCH_W = 4;
  localparam int PASSES  = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic                           flush = 1'b0;
  logic       [FETCH_W-1:0]       in_valid = '0;
  logic       [FETCH_W-1:0][31:0] in_pc = '0, in_inst = '0;
  logic       [FETCH_W-1:0]       al_valid;
  logic       [FETCH_W-1:0][31:0] al_pc;
  next_info_t [FETCH_W-1:0]       al_info;

  int checks = 0, failures = 0;

  sequence_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // expected reports, in order
  logic [31:0] exp_pc [$];
  next_info_t  exp_info [$];
  int          seen = 0;

  // reports of a cycle are taken slot by slot, which is program order
  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < FETCH_W; s++) begin
        if (al_valid[s]) begin
          seen++;
          checks++;
          if (exp_pc.size() == 0) begin
            failures++;
            $display("FAIL unexpected report pc=%h", al_pc[s]);
          end else begin
            logic [31:0] p;
            next_info_t i;
            p = exp_pc.pop_front();
            i = exp_info.pop_front();
            if (p != al_pc[s] || i != al_info[s]) begin
              failures++;
              $display("FAIL report slot %0d pc=%h info=%h, expected %h %h", s,
                       al_pc[s], al_info[s], p, i);
            end
          end
        end
      end
    end
  end

  // the stream: instructions plus markers for an idle cycle and a flush
  typedef enum logic [1:0] {K_INST, K_GAP, K_FLUSH} kind_e;
  kind_e       st_kind [$];
  logic [31:0] st_pc [$];
  logic [31:0] st_inst [$];
  logic [31:0] pair_pc [$];
  next_info_t  pair_info [$];

  logic [31:0] pc = 32'h0040_0000;

  task automatic feed(input logic [31:0] inst);
    st_kind.push_back(K_INST); st_pc.push_back(pc); st_inst.push_back(inst);
    pc += 4;
  endtask

  task automatic gap();
    st_kind.push_back(K_GAP); st_pc.push_back('0); st_inst.push_back('0);
  endtask

  task automatic mark_flush();
    st_kind.push_back(K_FLUSH); st_pc.push_back('0); st_inst.push_back('0);
  endtask

  task automatic expect_pair(input logic [31:0] p, input logic st, input int d);
    next_info_t i;
    i.is_store = st; i.distance = 3'(d);
    pair_pc.push_back(p);
    pair_info.push_back(i);
  endtask

  // replay the stream; mode 0: one per cycle, 1: random groups, 2: full groups
  task automatic replay(input int mode);
    int k;
    k = 0;
    foreach (pair_pc[j]) begin
      exp_pc.push_back(pair_pc[j]);
      exp_info.push_back(pair_info[j]);
    end
    while (k < st_kind.size()) begin
      @(negedge clk);
      in_valid = '0; in_pc = '0; in_inst = '0; flush = 1'b0;
      if (st_kind[k] == K_GAP) begin
        k++;
      end else if (st_kind[k] == K_FLUSH) begin
        flush = 1'b1;
        k++;
      end else begin
        int width;
        width = (mode == 0) ? 1 : (mode == 2) ? FETCH_W : 1 + int'($urandom % FETCH_W);
        for (int s = 0; s < width; s++) begin
          if (k < st_kind.size() && st_kind[k] == K_INST &&
              !(mode == 1 && ($urandom % 5) == 0)) begin
            in_valid[s] = 1'b1; in_pc[s] = st_pc[k]; in_inst[s] = st_inst[k];
            k++;
          end
        end
      end
    end
    @(negedge clk);
    in_valid = '0; flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // four loads off r10: three overlapping pairs
    expect_pair(32'h0040_0000, 0, 1);
    expect_pair(32'h0040_0004, 0, 1);
    expect_pair(32'h0040_0008, 0, 1);
    feed(lw(1, 0, 10)); feed(lw(2, 4, 10)); feed(lw(3, 8, 10)); feed(lw(4, 12, 10));
    gap();
    // stores, adjacent: pairs
    expect_pair(32'h0040_0010, 1, 1);
    expect_pair(32'h0040_0014, 1, 1);
    feed(sw(1, 0, 10)); feed(sw(2, 4, 10)); feed(sw(3, 8, 10));
    // loads separated by two ALU instructions: distance 3
    expect_pair(32'h0040_001c, 0, 3);
    feed(lw(5, 16, 11)); feed(addu(6, 7, 8)); feed(addu(9, 6, 6)); feed(lw(12, 20, 11));
    // no pairs from here on
    feed(lw(1, 0, 10)); feed(lw(2, 8, 10));                    // offsets 8 apart
    feed(lw(1, 0, 10)); feed(lw(2, 4, 11));                    // different base
    feed(lw(10, 0, 10)); feed(lw(2, 4, 10));                   // first load writes base
    feed(sw(1, 0, 10)); feed(addu(6, 7, 8)); feed(sw(2, 4, 10)); // store pair interrupted
    feed(lw(1, 0, 10)); feed(beq(3, 4)); feed(lw(2, 4, 10));     // branch between loads
    feed(lw(1, 0, 10)); feed(addu(10, 7, 8)); feed(lw(2, 4, 10)); // base overwritten
    feed(lw(1, 0, 10)); feed(addu(1, 7, 8)); feed(lw(2, 4, 10));  // first result overwritten
    feed(lw(1, 0, 10)); feed(addu(6, 7, 8)); feed(addu(6, 7, 8));
    feed(addu(6, 7, 8)); feed(addu(6, 7, 8)); feed(lw(2, 4, 10)); // beyond the window
    feed(lw(1, 0, 10)); feed(sw(2, 4, 10));                    // load then store
    // flush between two loads
    feed(lw(1, 0, 12));
    mark_flush();
    feed(lw(2, 4, 12));
    // the largest allowed gap still pairs: distance 4
    expect_pair(pc, 0, 4);
    feed(lw(1, 0, 13)); feed(addu(6, 7, 8)); feed(addu(6, 7, 8)); feed(addu(6, 7, 8));
    feed(lw(2, 4, 13));
    gap(); gap(); gap();

    for (int n = 0; n < PASSES; n++) replay(n);

    checks++;
    if (exp_pc.size() != 0 || seen != 7 * PASSES) begin
      failures++;
      $display("FAIL %0d expected reports missing, %0d seen", exp_pc.size(), seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
