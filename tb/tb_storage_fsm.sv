// tb_storage_fsm -- self-checking test of the Storage machine.
//
// Storage events are issued with fresh random result vectors; each record
// must appear in the SRAM model right after the previous one, starting at
// RESULT_BASE, be written with legal SRAM write timing, and end with `done`
// 8*E_LEN cycles after its event.  Two events close together test the held
// event, three test `overrun`; after N_RECORDS records `full` must stop
// further writes, and `clr` must rewind the table.
module tb_storage_fsm;
  import emul_pkg::*;

  localparam int unsigned E_LEN = 4;
  localparam int unsigned NREC  = 6;
  localparam addr_t       BASE  = 16'h0100;

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     clr, store;
  data_t    results [E_LEN];
  bus_req_t bus;
  data_t    q;
  logic     busy, done, full, overrun;
  logic [$clog2(NREC+1)-1:0] records;
  int       viol, reads, writes;
  int       viol0, writes0;
  int       checks = 0, failures = 0;
  int       n_overrun = 0;
  data_t    expect_t [NREC*E_LEN];
  int       rec_in;

  always #5 clk = ~clk;

  storage_fsm #(.E_LEN(E_LEN), .RESULT_BASE(BASE), .N_RECORDS(NREC)) dut (
    .clk, .rst_n, .clr, .store, .results, .bus, .busy, .done, .full, .overrun,
    .records);
  km68257c_model u_mem (.clk, .pins(bus), .q, .violations(viol), .reads, .writes);

  always @(posedge clk) if (rst_n && overrun) n_overrun++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one storage event with a new result vector, sampled by the machine now
  task automatic event_now();
    for (int i = 0; i < int'(E_LEN); i++) begin
      results[i] = data_t'($urandom);
      if (rec_in < int'(NREC)) expect_t[rec_in*E_LEN + i] = results[i];
    end
    rec_in++;
    store = 1'b1;
    @(negedge clk);
    store = 1'b0;
  endtask

  task automatic wait_done(output int cyc);
    cyc = 0;
    while (!done && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
  endtask

  initial begin
    int cyc;
    clr = 1'b0; store = 1'b0; rec_in = 0;
    for (int i = 0; i < int'(E_LEN); i++) results[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // bus activity before reset took effect is not counted
    viol0 = viol; writes0 = writes;
    for (int i = 0; i < 64; i++) u_mem.mem[int'(BASE) - 8 + i] = 24'h5A5A5A;
    // records 0, 1: single events, latency check
    event_now(); wait_done(cyc);
    check(cyc == 8 * int'(E_LEN) - 1, $sformatf("record latency %0d", cyc));
    repeat (20) @(negedge clk);
    event_now(); wait_done(cyc);
    check(cyc == 8 * int'(E_LEN) - 1, "record latency, second record");
    // records 2, 3: second event arrives while the first is written
    event_now();
    repeat (5) @(negedge clk);
    // the held event writes the vector present when it is served
    store = 1'b1; @(negedge clk); store = 1'b0;
    wait_done(cyc);
    for (int i = 0; i < int'(E_LEN); i++) begin
      results[i] = data_t'($urandom);
      expect_t[rec_in*E_LEN + i] = results[i];
    end
    rec_in++;
    wait_done(cyc);
    check(cyc == 8 * int'(E_LEN), "held event served at once");
    check(n_overrun == 0, "no overrun for one held event");
    // records 4, 5: three events during one record, one is lost
    event_now();
    repeat (3) @(negedge clk);
    store = 1'b1; @(negedge clk); store = 1'b0;
    repeat (3) @(negedge clk);
    store = 1'b1; @(negedge clk); store = 1'b0;
    wait_done(cyc);
    for (int i = 0; i < int'(E_LEN); i++) begin
      results[i] = data_t'($urandom);
      expect_t[rec_in*E_LEN + i] = results[i];
    end
    rec_in++;
    wait_done(cyc);
    check(n_overrun == 1, "overrun flagged once");
    check(full, "table full after N_RECORDS");
    check(int'(records) == int'(NREC), "record count");
    // a further event must not write
    event_now();
    repeat (60) @(negedge clk);
    check(!busy, "no record once full");
    check(writes - writes0 == int'(NREC * E_LEN), $sformatf("write cycles %0d", writes - writes0));
    check(viol == viol0, "SRAM write timing");
    for (int i = 0; i < int'(NREC * E_LEN); i++)
      check(u_mem.mem[int'(BASE) + i] == expect_t[i], $sformatf("table word %0d", i));
    check(u_mem.mem[int'(BASE) - 1] == 24'h5A5A5A, "word before the table untouched");
    check(u_mem.mem[int'(BASE) + int'(NREC*E_LEN)] == 24'h5A5A5A, "word after the table untouched");
    // rewind
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    check(!full && records == 0, "clear rewinds");
    rec_in = 0;
    event_now(); wait_done(cyc);
    for (int i = 0; i < int'(E_LEN); i++)
      check(u_mem.mem[int'(BASE) + i] == expect_t[i], "rewritten first record");
    check(bus.mcs_n && bus.rd_n && bus.wr_n && !bus.d_oe, "bus released when idle");
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
