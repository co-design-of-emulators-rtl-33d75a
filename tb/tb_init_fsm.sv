// tb_init_fsm -- self-checking test of the Init machine against the SRAM model.
//
// The SRAM is preloaded with random parameter words at PARAM_BASE and with
// other words around them.  After a Start request the machine must read
// exactly P_LEN words, meet the SRAM read timing (the model returns wrong
// data to a sample taken too early), end with `done` 7*P_LEN+1 cycles after
// the request, and hold the words in `params`.  Two loads are made, the second
// with new words, and one with three wait states in a second instance on a 2 ns clock,
// where the SRAM access time needs them.
module tb_init_fsm;
  import emul_pkg::*;

  localparam int unsigned P_LEN = 8;
  localparam addr_t       BASE  = 16'h0040;

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     start, start_w;
  bus_req_t bus, bus_w;
  data_t    q, q_w;
  data_t    params [P_LEN], params_w [P_LEN];
  logic     busy, done, busy_w, done_w;
  int       viol, reads, writes, viol_w, reads_w, writes_w;
  int       viol0, writes0;
  int       checks = 0, failures = 0;
  data_t    expect_p [P_LEN];

  always #5 clk = ~clk;

  init_fsm #(.P_LEN(P_LEN), .PARAM_BASE(BASE)) dut (
    .clk, .rst_n, .start, .rdata(q), .bus, .params, .busy, .done);
  km68257c_model u_mem (.clk, .pins(bus), .q, .violations(viol), .reads, .writes);

  init_fsm #(.P_LEN(P_LEN), .PARAM_BASE(BASE), .WAIT_CYCLES(3)) dut_w (
    .clk, .rst_n, .start(start_w), .rdata(q_w), .bus(bus_w), .params(params_w),
    .busy(busy_w), .done(done_w));
  km68257c_model #(.CLK_NS(2)) u_mem_w (.clk, .pins(bus_w), .q(q_w),
    .violations(viol_w), .reads(reads_w), .writes(writes_w));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic load_and_check(input int per_word, input bit waited);
    int cyc;
    int reads0;
    for (int i = -2; i < int'(P_LEN) + 2; i++) begin
      data_t v = data_t'($urandom);
      u_mem.mem[int'(BASE) + i]   = v;
      u_mem_w.mem[int'(BASE) + i] = v;
      if (i >= 0 && i < int'(P_LEN)) expect_p[i] = v;
    end
    reads0 = waited ? reads_w : reads;
    @(negedge clk);
    if (waited) start_w = 1'b1; else start = 1'b1;
    @(negedge clk);
    start = 1'b0; start_w = 1'b0;
    cyc = 1;
    while (!(waited ? done_w : done) && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == per_word * int'(P_LEN) + 1, $sformatf("load latency %0d", cyc));
    @(negedge clk);
    for (int i = 0; i < int'(P_LEN); i++)
      check((waited ? params_w[i] : params[i]) == expect_p[i], $sformatf("param %0d", i));
    check((waited ? reads_w : reads) - reads0 == int'(P_LEN), "read cycles");
    check(!(waited ? busy_w : busy), "idle after load");
  endtask

  initial begin
    start = 1'b0; start_w = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // bus activity before reset took effect is not counted
    viol0 = viol + viol_w; writes0 = writes + writes_w;
    check(bus.mcs_n && bus.rd_n && bus.wr_n && !bus.d_oe, "bus released while idle");
    load_and_check(7, 1'b0);
    load_and_check(7, 1'b0);
    load_and_check(10, 1'b1);
    check(viol + viol_w == viol0, "SRAM access timing");
    check(writes + writes_w == writes0, "no write cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
