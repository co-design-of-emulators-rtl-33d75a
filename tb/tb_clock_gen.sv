// tb_clock_gen -- self-checking test of the clock generator.
//
// A divider by 5 of the clock feeds a divider by 3 of its events, as the
// computing-step and storage-period generators are chained.  A reference
// count predicts every clock event of both; a clear in mid-period must
// restart the count.
module tb_clock_gen;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic t5, t15;
  int   checks = 0, failures = 0;
  int   n_en, n_t5, n5, n15;
  logic ref5, ref15;

  always #5 clk = ~clk;

  clock_gen #(.PERIOD(5)) u_a (.clk, .rst_n, .clr, .en(1'b1), .tick(t5));
  clock_gen #(.PERIOD(3)) u_b (.clk, .rst_n, .clr, .en(t5),   .tick(t15));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference: tick follows the PERIOD-th counted cycle by one cycle
  always @(posedge clk) begin
    if (!rst_n || clr) begin
      n_en <= 0; n_t5 <= 0; ref5 <= 0; ref15 <= 0;
    end else begin
      check(t5 == ref5, "divide-by-5 event");
      check(t15 == ref15, "divide-by-3 event");
      ref5  <= (n_en % 5) == 4;
      n_en  <= n_en + 1;
      if (t5) n_t5 <= n_t5 + 1;
      ref15 <= t5 && (n_t5 % 3) == 2;
      if (t5) n5++;
      if (t15) n15++;
    end
  end

  initial begin
    n5 = 0; n15 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (47) @(posedge clk);
    clr <= 1'b1;
    @(posedge clk);
    clr <= 1'b0;
    repeat (60) @(posedge clk);
    // events sampled before the clear: 9 (ticks raised at cycles 8..48);
    // after it: 11 of the 12 raised by the last edge; 15-events 3 and 3
    check(n5 == 9 + 11, "number of divide-by-5 events");
    check(n15 == 3 + 3, "number of divide-by-15 events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
