// Self-checking testbench for silence_predictor.
//
// Part 1 replays the worked example of silent store squashing: one static
// store (PC x) writing 100 twice with confidence/threshold going
// 3/4 -> 4/4 (Check) -> 4/3 after a silent verify -> 5/3 (Squash) -> 0/7
// after a failed trap. Part 2 runs random value training and verify outcomes
// on a few PCs (some aliasing in the table) and compares every lookup with a
// reference model kept in the testbench. Part 1 drives the same PC on all
// lookup ports; part 2 looks up a different random PC on each port.
module tb_silence_predictor;
  import sd_pkg::*;

  localparam int ENTRIES = 1024;
  localparam int PORTS   = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic       [PORTS-1:0][31:0] lk_pc = '0;
  sil_state_e [PORTS-1:0]       lk_state;
  logic       [PORTS-1:0][5:0]  lk_conf, lk_thres;
  logic        tr_valid = 1'b0, vf_valid = 1'b0, vf_silent = 1'b0;
  logic [31:0] tr_pc = '0, tr_value = '0, vf_pc = '0;

  int checks = 0, failures = 0;

  silence_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  int unsigned m_val [ENTRIES];
  int          m_conf [ENTRIES];
  int          m_thres [ENTRIES];

  function automatic int idx(input logic [31:0] pc);
    return int'(pc[11:2]);
  endfunction

  function automatic sil_state_e m_state(input int i);
    if (m_conf[i] < m_thres[i]) return SIL_NO_SQUASH;
    if (m_conf[i] == m_thres[i]) return SIL_CHECK;
    return SIL_SQUASH;
  endfunction

  // compare lookup port p (lk_pc[p] already driven) with the expectation
  task automatic check_port(input int p, input int conf, input int thres,
                            input sil_state_e st, input string what);
    checks++;
    if (lk_conf[p] != 6'(conf) || lk_thres[p] != 6'(thres) || lk_state[p] != st) begin
      failures++;
      $display("FAIL %s port %0d: conf=%0d thres=%0d state=%s, expected %0d %0d %s", what,
               p, lk_conf[p], lk_thres[p], lk_state[p].name(), conf, thres, st.name());
    end
  endtask

  task automatic expect_entry(input logic [31:0] pc, input int conf, input int thres,
                              input sil_state_e st, input string what);
    for (int p = 0; p < PORTS; p++) lk_pc[p] = pc;
    #1;
    for (int p = 0; p < PORTS; p++) check_port(p, conf, thres, st, what);
  endtask

  task automatic train(input logic [31:0] pc, input logic [31:0] value);
    @(negedge clk);
    tr_valid = 1'b1; tr_pc = pc; tr_value = value;
    @(negedge clk);
    tr_valid = 1'b0;
  endtask

  task automatic verify(input logic [31:0] pc, input logic silent);
    @(negedge clk);
    vf_valid = 1'b1; vf_pc = pc; vf_silent = silent;
    @(negedge clk);
    vf_valid = 1'b0;
  endtask

  localparam logic [31:0] PC_X = 32'h0040_0120;
  localparam logic [31:0] PC_Y = 32'h0040_0200;

  initial begin
    for (int i = 0; i < ENTRIES; i++) begin
      m_val[i] = 0; m_conf[i] = 0; m_thres[i] = 4;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---------------- Part 1: the worked example
    expect_entry(PC_X, 0, 4, SIL_NO_SQUASH, "after reset");
    // three earlier instances of the same value bring the confidence to 3
    train(PC_X, 32'd100);   // 0 -> 0 (history was 0, now 100): different
    expect_entry(PC_X, 0, 4, SIL_NO_SQUASH, "first value");
    train(PC_X, 32'd100); train(PC_X, 32'd100); train(PC_X, 32'd100);
    expect_entry(PC_X, 3, 4, SIL_NO_SQUASH, "(a) store 100 to A");
    train(PC_X, 32'd100);
    expect_entry(PC_X, 4, 4, SIL_CHECK, "(b) confidence reaches threshold");
    verify(PC_X, 1'b1);
    expect_entry(PC_X, 4, 3, SIL_SQUASH, "(b) silent verify lowers threshold");
    train(PC_Y, 32'd50);    // (c) another static store: different entry
    expect_entry(PC_X, 4, 3, SIL_SQUASH, "(c) other store leaves entry");
    train(PC_X, 32'd100);
    expect_entry(PC_X, 5, 3, SIL_SQUASH, "(d) squash state");
    verify(PC_X, 1'b0);
    expect_entry(PC_X, 0, 7, SIL_NO_SQUASH, "(e) after misprediction");
    // a different value lowers the confidence (saturating at zero)
    train(PC_X, 32'd7);
    expect_entry(PC_X, 0, 7, SIL_NO_SQUASH, "different value at zero");
    // only the low 8 bits are compared
    train(PC_X, 32'h1234_5607);
    expect_entry(PC_X, 1, 7, SIL_NO_SQUASH, "low 8 bits compared");

    // sync the model with part 1
    m_val[idx(PC_X)] = 8'h07; m_conf[idx(PC_X)] = 1; m_thres[idx(PC_X)] = 7;
    m_val[idx(PC_Y)] = 50;    m_conf[idx(PC_Y)] = 0;

    // ---------------- Part 2: random training against the model
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] pc_t, pc_v, val;
      logic do_t, do_v, sil;
      int it, iv;
      pc_t = 32'h0040_0000 + 32'(($urandom % 6) * 4) + (($urandom % 2) != 0 ? 32'h1000 : 32'h0);
      pc_v = 32'h0040_0000 + 32'(($urandom % 6) * 4);
      val  = ($urandom % 4 == 0) ? $urandom : 32'(($urandom % 2) + 3);
      do_t = ($urandom % 3) != 0;
      do_v = ($urandom % 3) == 0;
      sil  = ($urandom % 4) != 0;
      @(negedge clk);
      tr_valid = do_t; tr_pc = pc_t; tr_value = val;
      vf_valid = do_v; vf_pc = pc_v; vf_silent = sil;
      it = idx(pc_t); iv = idx(pc_v);
      @(negedge clk);
      tr_valid = 1'b0; vf_valid = 1'b0;
      if (do_t) begin
        if (m_val[it] == int'(val[7:0])) m_conf[it] = (m_conf[it] == 63) ? 63 : m_conf[it] + 1;
        else                             m_conf[it] = (m_conf[it] == 0) ? 0 : m_conf[it] - 1;
        m_val[it] = int'(val[7:0]);
      end
      if (do_v) begin
        if (sil) m_thres[iv] = (m_thres[iv] == 0) ? 0 : m_thres[iv] - 1;
        else begin
          m_thres[iv] = (m_thres[iv] + 4 > 63) ? 63 : m_thres[iv] + 4;
          m_conf[iv] = 0;
        end
      end
      begin
        logic [PORTS-1:0][31:0] q;
        for (int p = 0; p < PORTS; p++) begin
          q[p] = 32'h0040_0000 + 32'(($urandom % 6) * 4);
          lk_pc[p] = q[p];
        end
        #1;
        for (int p = 0; p < PORTS; p++)
          check_port(p, m_conf[idx(q[p])], m_thres[idx(q[p])], m_state(idx(q[p])), "random");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
