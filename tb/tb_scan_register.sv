// tb_scan_register: self-checking test of the multiplexed scan flip-flop.
//
// Applies random data, scan and select values for many clocks and checks that
// q always holds the value that was selected by se (si when se is high, di
// when low) at the previous rising edge, and that reset clears q.
module tb_scan_register;

  logic clk = 1'b0;
  logic rst_n, se, di, si, q;
  int   checks = 0, failures = 0;
  int   n_shift = 0, n_data = 0;

  scan_register dut (.clk(clk), .rst_n(rst_n), .se(se), .di(di), .si(si), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic expected;
    se = 0; di = 1; si = 1; rst_n = 0;
    #12;
    check(q, 1'b0, "reset");
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      se = 1'($urandom); di = 1'($urandom); si = 1'($urandom);
      expected = se ? si : di;
      if (se) n_shift++; else n_data++;
      @(posedge clk);
      #1;
      check(q, expected, se ? "test mode" : "data mode");
      @(negedge clk);
    end
    // asynchronous reset in mid-cycle
    se = 0; di = 1;
    @(posedge clk); #1; check(q, 1'b1, "load 1");
    #2 rst_n = 0; #1; check(q, 1'b0, "async reset");
    checks++;
    if (n_shift == 0 || n_data == 0) begin
      failures++;
      $display("FAIL: a mode was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
