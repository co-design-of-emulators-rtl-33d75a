// tb_emul_core -- self-checking test of the EmulCore sequencer.
//
// The core runs on the SRAM model with small sizes.  A stand-in for the
// computing behaviours counts computing steps and presents the outputs
// E_i = P_i + steps*(i+1), so every stored record can be predicted: record k
// (from 1) holds the outputs after k*XS steps.  The test checks the Start
// synchronisation, the parameter load, the spacing of records (one per
// STEP*XS clocks), the End event after N_RECORDS records, the release of the
// bus, and a second emulation started from the END phase with new parameters.
module tb_emul_core;
  import emul_pkg::*;

  localparam int unsigned P_LEN = 3, E_LEN = 3, NREC = 5, STEP = 20, XS = 3;
  localparam addr_t PB = 16'h0008, RB = 16'h0020;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start, end_irq, step, store, record_done;
  bus_req_t   bus;
  data_t      q;
  data_t      params [P_LEN];
  data_t      results [E_LEN];
  emu_phase_e phase;
  logic [$clog2(NREC+1)-1:0] records;
  int         viol, reads, writes;
  int         viol0, writes0, reads0;
  int         checks = 0, failures = 0;
  int         nstep;
  int         last_done, n_done, n_store;

  always #5 clk = ~clk;

  emul_core #(.P_LEN(P_LEN), .E_LEN(E_LEN), .PARAM_BASE(PB), .RESULT_BASE(RB),
              .N_RECORDS(NREC), .STEP_CYCLES(STEP), .XS(XS)) dut (
    .clk, .rst_n, .start_async(start), .end_irq, .bus, .rdata(q), .params,
    .results, .step, .store, .record_done, .phase, .records);
  km68257c_model u_mem (.clk, .pins(bus), .q, .violations(viol), .reads, .writes);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // computing stand-in
  always @(posedge clk) begin
    if (phase == EMU_INIT) nstep <= 0;
    else if (step) nstep <= nstep + 1;
  end
  always_comb
    for (int i = 0; i < int'(E_LEN); i++)
      results[i] = params[i] + data_t'(nstep * (i + 1));

  int cyc;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (store) n_store <= n_store + 1;
    if (record_done) begin
      if (n_done > 0)
        check(cyc - last_done == int'(STEP * XS), $sformatf("record spacing %0d", cyc - last_done));
      last_done <= cyc;
      n_done    <= n_done + 1;
    end
  end

  task automatic run_once(input int seed);
    data_t p [P_LEN];
    int t0, w;
    for (int i = 0; i < int'(P_LEN); i++) begin
      p[i] = data_t'($urandom);
      u_mem.mem[int'(PB) + i] = p[i];
    end
    n_done = 0; n_store = 0;
    @(negedge clk);
    check(phase inside {EMU_IDLE, EMU_END}, "waiting for Start");
    start = 1'b1; @(negedge clk); start = 1'b0;
    t0 = cyc;
    w = 0;
    while (phase != EMU_INIT && w < 10) begin @(negedge clk); w++; end
    check(w >= 1 && w <= 3, $sformatf("Start synchroniser latency %0d", w));
    check(!end_irq, "End cleared by Start");
    while (phase == EMU_INIT) @(negedge clk);
    check(phase == EMU_RUN, "RUN after INIT");
    for (int i = 0; i < int'(P_LEN); i++) check(params[i] == p[i], $sformatf("parameter %0d", i));
    w = 0;
    while (!end_irq && w < 100000) begin @(negedge clk); w++; end
    check(end_irq && phase == EMU_END, "End event");
    check(n_done == int'(NREC), $sformatf("records written %0d", n_done));
    check(int'(records) == int'(NREC), "record counter");
    check(n_store == int'(NREC), $sformatf("storage events %0d", n_store));
    for (int k = 1; k <= int'(NREC); k++)
      for (int i = 0; i < int'(E_LEN); i++)
        check(u_mem.mem[int'(RB) + (k-1)*int'(E_LEN) + i] == p[i] + data_t'(k * int'(XS) * (i + 1)),
              $sformatf("record %0d word %0d", k, i));
    repeat (3 * STEP * XS) @(negedge clk);
    check(end_irq && bus.mcs_n && !bus.d_oe, "bus released, End held");
    check(n_done == int'(NREC), "nothing written after End");
  endtask

  initial begin
    start = 1'b0; cyc = 0; last_done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    // bus activity before reset took effect is not counted
    viol0 = viol; writes0 = writes; reads0 = reads;
    check(phase == EMU_IDLE && !end_irq && bus.mcs_n, "idle after reset");
    run_once(1);
    run_once(2);
    check(viol == viol0, "SRAM timing");
    check(writes - writes0 == int'(2 * NREC * E_LEN), "write cycles");
    check(reads - reads0 == int'(2 * P_LEN), "read cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
