// tb_satm_pe: self-checking test of one SA-TM processing element.
// Drives random pixels, template values, mask bits and incoming partial
// sums with a random enable, and compares the registered sum with
// sum_in + (mask ? |pix - tmpl| : 0) computed here, including extreme
// values (0 and 255) and holding while the enable is low.
module tb_satm_pe;
  localparam int PIX_W = 8;
  localparam int SUM_W = 16;

  logic             clk = 1'b0;
  logic             en;
  logic [PIX_W-1:0] pix, tmpl;
  logic             mask;
  logic [SUM_W-1:0] sum_in, sum_out;
  int checks = 0, failures = 0;

  satm_pe dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SUM_W-1:0] expect_v, prev;
    int d;
    en = 1'b1; pix = '0; tmpl = '0; mask = 1'b0; sum_in = '0;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      en     = ($urandom_range(0, 3) != 0);
      pix    = (n % 7 == 0) ? 8'd0 : (n % 7 == 1) ? 8'd255 : PIX_W'($urandom);
      tmpl   = (n % 5 == 0) ? 8'd255 : (n % 5 == 1) ? 8'd0 : PIX_W'($urandom);
      mask   = ($urandom_range(0, 2) != 0);
      sum_in = SUM_W'($urandom_range(0, 60000));
      prev   = sum_out;
      d = int'(pix) - int'(tmpl);
      if (d < 0) d = -d;
      expect_v = en ? SUM_W'(int'(sum_in) + (mask ? d : 0)) : prev;
      @(negedge clk);
      checks++;
      if (sum_out !== expect_v) begin
        failures++;
        if (failures < 10)
          $display("mismatch n=%0d en=%0b pix=%0d tmpl=%0d mask=%0b in=%0d got=%0d exp=%0d",
                   n, en, pix, tmpl, mask, sum_in, sum_out, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
