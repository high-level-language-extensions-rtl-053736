// tb_task_sync: self-checking test of the sync task handshake.
// Instance u_s (SYNC=1): the task must not start without host_go, nor
// while not ready; task_start is a single pulse; busy lasts until
// task_done; host_done then stays high until host_ack, and no new run
// starts before it. Instance u_n (SYNC=0): the task starts by itself once
// ready and host_done is a one-clock pulse with no acknowledgement.
module tb_task_sync;
  logic clk = 1'b0, rst_n = 1'b0;
  logic go = 1'b0, ready = 1'b0, done_s = 1'b0, done_n = 1'b0, ack = 1'b0;
  logic start_s, busy_s, hdone_s;
  logic start_n, busy_n, hdone_n;
  int checks = 0, failures = 0;
  int starts_s = 0, starts_n = 0;

  task_sync #(.SYNC(1'b1)) u_s (.clk, .rst_n, .host_go(go), .ready, .task_start(start_s),
                                .task_done(done_s), .busy(busy_s), .host_done(hdone_s),
                                .host_ack(ack));
  task_sync #(.SYNC(1'b0)) u_n (.clk, .rst_n, .host_go(1'b0), .ready, .task_start(start_n),
                                .task_done(done_n), .busy(busy_n), .host_done(hdone_n),
                                .host_ack(1'b0));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && start_s) starts_s++;
    if (rst_n && start_n) starts_n++;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0b exp %0b", what, got, exp);
    end
  endtask

  task automatic chk_n(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Not ready: neither instance starts, even with go.
    go = 1'b1;
    repeat (4) @(negedge clk);
    chk(busy_s, 1'b0, "sync starts while not ready");
    chk(busy_n, 1'b0, "free task starts while not ready");
    go = 1'b0;
    ready = 1'b1;
    repeat (4) @(negedge clk);
    chk(busy_s, 1'b0, "sync starts without go");
    chk(busy_n, 1'b1, "free task did not start when ready");
    chk_n(starts_n, 1, "free task one start");
    // Host go: one start pulse, then busy.
    go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    chk(busy_s, 1'b1, "busy after go");
    chk(start_s, 1'b1, "start pulse");
    @(negedge clk);
    chk(start_s, 1'b0, "start is one clock");
    repeat (5) @(negedge clk);
    chk(busy_s, 1'b1, "busy until done");
    chk(hdone_s, 1'b0, "host_done before done");
    // Finish both tasks.
    done_s = 1'b1; done_n = 1'b1;
    @(negedge clk);
    done_s = 1'b0; done_n = 1'b0;
    chk(busy_s, 1'b0, "idle after done");
    chk(hdone_s, 1'b1, "host_done raised");
    chk(hdone_n, 1'b1, "free host_done pulse");
    // Host busy elsewhere: host_done holds, go is ignored until ack.
    go = 1'b1;
    repeat (6) @(negedge clk);
    chk(hdone_s, 1'b1, "host_done held until ack");
    chk(busy_s, 1'b0, "no restart before ack");
    chk(hdone_n, 1'b0, "free host_done is a pulse");
    chk_n(starts_n, 2, "free task restarted once");
    ack = 1'b1;
    @(negedge clk);
    ack = 1'b0;
    chk(hdone_s, 1'b0, "host_done dropped on ack");
    @(negedge clk);
    chk(busy_s, 1'b1, "held go restarts after ack");
    go = 1'b0;
    @(negedge clk);
    chk_n(starts_s, 2, "two starts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
