// tb_satm_rtp_params: self-checking test of the run-time parameter store.
// Uses a 4x3 template. Checks that: nothing is configured after reset;
// shadow writes do not reach the active set before a commit; a commit
// with apply_ok high moves every written value at once and pulses
// applied; a commit while apply_ok is low is held pending, leaves the
// active set alone, and is applied when apply_ok rises; a write in the
// commit clock is included; out-of-range addresses are ignored.
module tb_satm_rtp_params;
  localparam int TW = 3, TH = 4, PIX_W = 8;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             wr_en = 1'b0;
  logic [1:0]       wr_row = '0, wr_col = '0;
  logic [PIX_W-1:0] wr_tmpl = '0;
  logic             wr_mask = 1'b0;
  logic             commit = 1'b0, apply_ok = 1'b1;
  logic [PIX_W-1:0] tmpl [TH][TW];
  logic             mask [TH][TW];
  logic             pending, applied, configured;
  int checks = 0, failures = 0;

  logic [PIX_W-1:0] m_sh_t [TH][TW], m_act_t [TH][TW];
  logic             m_sh_m [TH][TW], m_act_m [TH][TW];

  satm_rtp_params #(.TMPL_W(TW), .TMPL_H(TH), .PIX_W(PIX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0b exp %0b", what, got, exp);
    end
  endtask

  task automatic compare_active(input string what);
    for (int i = 0; i < TH; i++)
      for (int j = 0; j < TW; j++) begin
        checks++;
        if (tmpl[i][j] !== m_act_t[i][j] || mask[i][j] !== m_act_m[i][j]) begin
          failures++;
          if (failures < 10) $display("%s: [%0d][%0d] %0d/%0b exp %0d/%0b", what, i, j,
                                      tmpl[i][j], mask[i][j], m_act_t[i][j], m_act_m[i][j]);
        end
      end
  endtask

  task automatic write(input int r, input int c, input logic [PIX_W-1:0] t, input logic m,
                       input logic with_commit);
    wr_en = 1'b1; wr_row = 2'(r); wr_col = 2'(c); wr_tmpl = t; wr_mask = m;
    commit = with_commit;
    if (r < TH && c < TW) begin
      m_sh_t[r][c] = t;
      m_sh_m[r][c] = m;
    end
    @(negedge clk);
    wr_en = 1'b0; commit = 1'b0;
  endtask

  task automatic write_all();
    for (int i = 0; i < TH; i++)
      for (int j = 0; j < TW; j++) write(i, j, PIX_W'($urandom), 1'($urandom), 1'b0);
  endtask

  initial begin
    for (int i = 0; i < TH; i++)
      for (int j = 0; j < TW; j++) begin
        m_sh_t[i][j] = '0; m_sh_m[i][j] = 1'b0; m_act_t[i][j] = '0; m_act_m[i][j] = 1'b0;
      end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_bit(configured, 1'b0, "configured after reset");
    compare_active("after reset");

    // Writes alone change nothing.
    write_all();
    compare_active("before commit");
    expect_bit(configured, 1'b0, "configured before commit");

    // Commit with apply_ok high: all values move together.
    commit = 1'b1;
    @(negedge clk);
    commit = 1'b0;
    m_act_t = m_sh_t; m_act_m = m_sh_m;
    compare_active("after commit");
    expect_bit(applied, 1'b1, "applied pulse");
    expect_bit(configured, 1'b1, "configured after commit");
    @(negedge clk);
    expect_bit(applied, 1'b0, "applied is one clock");

    // Commit while busy is deferred.
    write_all();
    apply_ok = 1'b0;
    commit = 1'b1;
    @(negedge clk);
    commit = 1'b0;
    expect_bit(pending, 1'b1, "pending while busy");
    expect_bit(applied, 1'b0, "not applied while busy");
    repeat (5) @(negedge clk);
    compare_active("deferred commit, still busy");
    write(1, 1, 8'hA5, 1'b1, 1'b0);          // shadow change during the wait
    apply_ok = 1'b1;
    @(negedge clk);
    m_act_t = m_sh_t; m_act_m = m_sh_m;
    compare_active("deferred commit applied");
    expect_bit(pending, 1'b0, "pending cleared");
    expect_bit(applied, 1'b1, "applied after wait");

    // A write in the commit clock is included; out of range is ignored.
    write(3, 3, 8'h11, 1'b1, 1'b0);
    write(2, 0, 8'h5C, 1'b1, 1'b1);
    m_act_t = m_sh_t; m_act_m = m_sh_m;
    compare_active("write with commit");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
