// tb_satm_line_buffer: self-checking test of the scan-line shift register.
// Pushes random words with a random enable into the default-depth buffer
// (88 stages, one 100-pixel line less a 12-pixel template row) and into a
// 1-stage and a 0-stage buffer, and checks each output against a queue
// model: after DEPTH enabled clocks a word must appear at dout.
module tb_satm_line_buffer;
  localparam int W = 16;

  logic         clk = 1'b0;
  logic         en;
  logic [W-1:0] din;
  logic [W-1:0] dout_d, dout_1, dout_0;
  int checks = 0, failures = 0;

  satm_line_buffer #(.WIDTH(W))            u_def (.clk, .en, .din, .dout(dout_d));
  satm_line_buffer #(.WIDTH(W), .DEPTH(1)) u_one (.clk, .en, .din, .dout(dout_1));
  satm_line_buffer #(.WIDTH(W), .DEPTH(0)) u_zer (.clk, .en, .din, .dout(dout_0));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] hist [$];   // every word shifted in, oldest first

  task automatic check(input logic [W-1:0] got, input int depth, input string name);
    if (hist.size() >= depth + 1 && depth > 0) begin
      checks++;
      if (got !== hist[hist.size() - depth]) begin
        failures++;
        if (failures < 10) $display("%s: got %h exp %h", name, got, hist[hist.size() - depth]);
      end
    end
  endtask

  initial begin
    en = 1'b0; din = '0;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      en  = ($urandom_range(0, 4) != 0);
      din = W'($urandom);
      checks++;
      if (dout_0 !== din) failures++;
      @(negedge clk);
      if (en) hist.push_back(din);
      check(dout_d, 88, "depth88");
      check(dout_1, 1, "depth1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
