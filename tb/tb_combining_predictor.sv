// Self-checking testbench for combining_predictor.
//
// Directed part: an entry is allocated, alignment outcomes are shifted in and
// the prediction is checked against the two combining patterns (1111 and
// 1010, newest outcome rightmost); a different PC mapping to the same entry
// misses on the tag and, when allocated, replaces the entry. Random part:
// allocations and outcomes for a few aliasing PCs are compared with a
// reference model kept in the testbench (the outcome applied first, then the
// allocations in port order). Directed lookups drive the same PC on every
// port and check all of them; random cycles use a different PC per port and
// several allocation ports at once.
module tb_combining_predictor;
  import sd_pkg::*;

  localparam int ENTRIES = 1024;
  localparam int PORTS   = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic       [PORTS-1:0][31:0] lk_pc = '0, al_pc = '0;
  logic       [31:0]            up_pc = '0;
  logic       [PORTS-1:0]       lk_hit, lk_combine;
  next_info_t [PORTS-1:0]       lk_info, al_info;
  logic       [PORTS-1:0]       al_valid = '0;
  logic                         up_valid = 1'b0, up_aligned = 1'b0;

  int checks = 0, failures = 0;

  combining_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  bit          m_v [ENTRIES];
  logic [31:0] m_pc [ENTRIES];
  next_info_t  m_info [ENTRIES];
  logic [3:0]  m_h [ENTRIES];

  function automatic int idx(input logic [31:0] pc);
    return int'(pc[11:2]);
  endfunction

  // compare lookup port p (lk_pc[p] already driven) with the expectation
  task automatic check_port(input int p, input logic hit, input logic comb,
                            input next_info_t info, input string what);
    checks++;
    if (lk_hit[p] !== hit || lk_combine[p] !== comb || (hit && lk_info[p] !== info)) begin
      failures++;
      $display("FAIL %s port %0d: hit=%b combine=%b info=%h, expected %b %b %h", what,
               p, lk_hit[p], lk_combine[p], lk_info[p], hit, comb, info);
    end
  endtask

  task automatic expect_lookup(input logic [31:0] pc, input logic hit, input logic comb,
                               input next_info_t info, input string what);
    for (int p = 0; p < PORTS; p++) lk_pc[p] = pc;
    #1;
    for (int p = 0; p < PORTS; p++) check_port(p, hit, comb, info, what);
  endtask

  // allocate through port p
  task automatic alloc(input logic [31:0] pc, input next_info_t info, input int p = 0);
    @(negedge clk);
    al_valid[p] = 1'b1; al_pc[p] = pc; al_info[p] = info;
    @(negedge clk);
    al_valid = '0;
  endtask

  task automatic outcome(input logic [31:0] pc, input logic aligned);
    @(negedge clk);
    up_valid = 1'b1; up_pc = pc; up_aligned = aligned;
    @(negedge clk);
    up_valid = 1'b0;
  endtask

  localparam logic [31:0] PC_A = 32'h0040_0100;
  localparam logic [31:0] PC_B = 32'h0041_0100;   // same index, other tag
  localparam next_info_t  LD2  = '{is_store: 1'b0, distance: 3'd2};
  localparam next_info_t  ST1  = '{is_store: 1'b1, distance: 3'd1};

  initial begin
    for (int i = 0; i < ENTRIES; i++) begin
      m_v[i] = 0; m_pc[i] = '0; m_info[i] = '0; m_h[i] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    expect_lookup(PC_A, 1'b0, 1'b0, LD2, "empty table");
    alloc(PC_A, LD2);
    expect_lookup(PC_A, 1'b1, 1'b0, LD2, "new entry: history 0000");
    outcome(PC_A, 1); outcome(PC_A, 1); outcome(PC_A, 1);
    expect_lookup(PC_A, 1'b1, 1'b0, LD2, "history 0111");
    outcome(PC_A, 1);
    expect_lookup(PC_A, 1'b1, 1'b1, LD2, "history 1111 -> combine");
    outcome(PC_A, 0);
    expect_lookup(PC_A, 1'b1, 1'b0, LD2, "history 1110");
    outcome(PC_A, 1); outcome(PC_A, 0); outcome(PC_A, 1); outcome(PC_A, 0);
    expect_lookup(PC_A, 1'b1, 1'b1, LD2, "history 1010 -> combine");
    outcome(PC_A, 1);
    expect_lookup(PC_A, 1'b1, 1'b0, LD2, "history 0101");
    outcome(PC_A, 0);
    alloc(PC_A, LD2, 2);    // re-detection keeps the history
    expect_lookup(PC_A, 1'b1, 1'b1, LD2, "re-allocation keeps history");
    expect_lookup(PC_B, 1'b0, 1'b0, ST1, "aliasing PC misses on tag");
    outcome(PC_B, 1);       // outcome of a non-owner is ignored
    expect_lookup(PC_A, 1'b1, 1'b1, LD2, "non-owner outcome ignored");
    alloc(PC_B, ST1, 3);
    expect_lookup(PC_B, 1'b1, 1'b0, ST1, "replacement by another PC");
    expect_lookup(PC_A, 1'b0, 1'b0, LD2, "old owner evicted");

    // reset the model to the current state
    m_v[idx(PC_B)] = 1; m_pc[idx(PC_B)] = PC_B; m_info[idx(PC_B)] = ST1; m_h[idx(PC_B)] = '0;

    // random part
    for (int n = 0; n < 5000; n++) begin
      logic [PORTS-1:0][31:0] pa, q;
      logic [PORTS-1:0]       da;
      next_info_t [PORTS-1:0] inf;
      logic [31:0] pu;
      logic du, al;
      int iu;
      for (int p = 0; p < PORTS; p++) begin
        pa[p]  = 32'h0040_0000 + 32'(($urandom % 4) * 4) + (($urandom % 4) == 0 ? 32'h0002_0000 : 32'h0);
        da[p]  = ($urandom % 8) == 0;
        inf[p] = next_info_t'($urandom);
      end
      pu = 32'h0040_0000 + 32'(($urandom % 4) * 4) + (($urandom % 4) == 0 ? 32'h0002_0000 : 32'h0);
      du = ($urandom % 2) == 0;
      al = ($urandom % 5) != 0;
      @(negedge clk);
      al_valid = da; al_pc = pa; al_info = inf;
      up_valid = du; up_pc = pu; up_aligned = al;
      @(negedge clk);
      al_valid = '0; up_valid = 1'b0;
      iu = idx(pu);
      // model: the outcome is applied first, then the allocations in port order
      if (du && m_v[iu] && m_pc[iu] == pu) m_h[iu] = {m_h[iu][2:0], al};
      for (int p = 0; p < PORTS; p++) begin
        if (da[p]) begin
          int ia;
          ia = idx(pa[p]);
          if (!(m_v[ia] && m_pc[ia] == pa[p])) m_h[ia] = '0;
          m_v[ia] = 1; m_pc[ia] = pa[p]; m_info[ia] = inf[p];
        end
      end
      for (int p = 0; p < PORTS; p++) begin
        q[p] = 32'h0040_0000 + 32'(($urandom % 4) * 4) + (($urandom % 4) == 0 ? 32'h0002_0000 : 32'h0);
        lk_pc[p] = q[p];
      end
      #1;
      for (int p = 0; p < PORTS; p++)
        check_port(p, m_v[idx(q[p])] && m_pc[idx(q[p])] == q[p],
                   m_v[idx(q[p])] && m_pc[idx(q[p])] == q[p] &&
                   (m_h[idx(q[p])] == 4'b1111 || m_h[idx(q[p])] == 4'b1010),
                   m_info[idx(q[p])], "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
