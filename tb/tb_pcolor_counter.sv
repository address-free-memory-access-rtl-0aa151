// tb_pcolor_counter: random call/return sequences, including deep nesting
// that wraps the 2-bit colour and simultaneous call and return; the colour is
// checked each cycle against an integer call depth taken modulo 4.
module tb_pcolor_counter;
  logic clk = 0, rst_n = 0, call = 0, ret = 0;
  logic [1:0] pcolor;
  always #5 clk = ~clk;

  pcolor_counter dut (.*);

  int checks = 0, failures = 0, depth = 0, n_wrap = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check(pcolor == 2'd0, "reset value");
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      // long runs of calls in the first part to wrap the counter
      call = (k < 500) ? ($urandom_range(0, 9) < 7) : ($urandom_range(0, 1) != 0);
      ret  = $urandom_range(0, 2) == 0;
      @(posedge clk);
      if (call && !ret) depth++;
      if (ret && !call) depth--;
      if (depth >= 4 || depth < 0) n_wrap++;
      #1 check(pcolor == 2'(depth), "colour");
    end
    check(n_wrap > 0, "wrap-around exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
