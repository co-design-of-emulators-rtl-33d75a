// tb_emulator_top -- end-to-end test of the autonomous emulator, full size.
//
// The whole exchange runs twice with every parameter at its default:
//   1. the processor model writes the P_LEN parameters into the SRAM over
//      the shared bus, then raises Start and leaves the bus;
//   2. the core loads the parameters, runs 1 us computing steps and writes a
//      record every Ts = XS steps, N_RECORDS records in all;
//   3. the End event sets the processor's interrupt flag F_end, and the
//      processor reads the whole results table back over the bus.
// A stand-in for the computing behaviours presents E_i = P_i + steps*(i+1)
// at each step, so the table read back is predicted word by word: record k
// (from 1) holds the outputs after k*XS steps.  The test counts each
// mechanism of the exchange (processor bus cycles, Start, parameter reads,
// computing steps, storage events, records, End, table reads, restart from
// END) and fails if one never happened.  It also checks the step period of
// STEP_CYCLES clocks, the record spacing of STEP_CYCLES*XS clocks, the SRAM
// timing and that the two masters never met on the bus.
module tb_emulator_top;
  import emul_pkg::*;

  localparam int unsigned P_LEN = 8, E_LEN = 8, NREC = 1024;
  localparam int unsigned STEP = 100, XS = 10;
  localparam addr_t PB = 16'h0000, RB = 16'h0010;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start, end_irq, f_end, step, store, record_done, conflict;
  bus_req_t   dsp, mem;
  data_t      d, mem_q;
  data_t      params [P_LEN];
  data_t      results [E_LEN];
  emu_phase_e phase;
  logic [$clog2(NREC+1)-1:0] records;
  int         viol, reads, writes;
  int         viol0;
  int         checks = 0, failures = 0;
  int         nstep, cyc, last_done, n_done, last_step;
  // mechanism counters
  int         m_dsp_write, m_start, m_param_read, m_step, m_store, m_record;
  int         m_end, m_table_read, m_restart, m_conflict;

  always #5 clk = ~clk;

  emulator_top dut (
    .clk, .rst_n, .start, .end_irq, .dsp, .d, .mem, .mem_q, .params, .results,
    .step, .store, .record_done, .phase, .records, .conflict);
  km68257c_model u_mem (.clk, .pins(mem), .q(mem_q), .violations(viol), .reads, .writes);
  dsp56600_model u_dsp (.clk, .d, .irq(end_irq), .bus(dsp), .start, .f_end);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
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

  emu_phase_e phase_q;
  always @(posedge clk) if (rst_n) begin
    cyc     <= cyc + 1;
    phase_q <= phase;
    if (step) begin
      m_step <= m_step + 1;
      // the computing step: one event every STEP_CYCLES clocks (1 us)
      if (phase == EMU_RUN && last_step > 0)
        check(cyc - last_step == int'(STEP), "computing step period");
      last_step <= cyc;
    end
    if (phase != EMU_RUN) last_step <= 0;
    if (store) m_store <= m_store + 1;
    if (conflict) m_conflict <= m_conflict + 1;
    if (phase == EMU_END && phase_q != EMU_END) m_end <= m_end + 1;
    if (phase == EMU_INIT && phase_q == EMU_END) m_restart <= m_restart + 1;
    if (phase == EMU_INIT && phase_q != EMU_INIT) m_start <= m_start + 1;
    if (record_done) begin
      if (n_done > 0)
        check(cyc - last_done == int'(STEP * XS), "record spacing");
      last_done <= cyc;
      n_done    <= n_done + 1;
      m_record  <= m_record + 1;
    end
  end

  task automatic emulate();
    data_t p [P_LEN];
    data_t v;
    int    w, reads0;
    // 1. parameters through the bus
    for (int i = 0; i < int'(P_LEN); i++) begin
      p[i] = data_t'($urandom);
      u_dsp.write_word(PB + addr_t'(i), p[i]);
      m_dsp_write++;
    end
    for (int i = 0; i < int'(P_LEN); i++)
      check(u_mem.mem[int'(PB) + i] == p[i], "parameter stored by the processor");
    n_done = 0;
    reads0 = reads;
    u_dsp.pulse_start(2);
    // 2. the core runs on its own
    w = 0;
    while (phase != EMU_RUN && w < 1000) begin @(negedge clk); w++; end
    m_param_read += reads - reads0;
    check(reads - reads0 == int'(P_LEN), "parameter reads by the core");
    for (int i = 0; i < int'(P_LEN); i++) check(params[i] == p[i], "parameter loaded");
    w = 0;
    while (!f_end && w < 2000000) begin @(negedge clk); w++; end
    check(f_end, "interrupt flag F_end set by End");
    check(n_done == int'(NREC), $sformatf("records %0d", n_done));
    // 3. results table back through the bus
    for (int k = 1; k <= int'(NREC); k++)
      for (int i = 0; i < int'(E_LEN); i++) begin
        u_dsp.read_word(RB + addr_t'((k-1) * int'(E_LEN) + i), v);
        m_table_read++;
        check(v == p[i] + data_t'(k * int'(XS) * (i + 1)), $sformatf("table record %0d word %0d", k, i));
      end
    check(phase == EMU_END && end_irq, "End held while the table is read");
  endtask

  initial begin
    {m_dsp_write, m_start, m_param_read, m_step, m_store, m_record} = '0;
    {m_end, m_table_read, m_restart, m_conflict} = '0;
    cyc = 0; last_done = 0; n_done = 0; last_step = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    // bus activity before reset took effect is not counted
    viol0 = viol;
    emulate();
    emulate();
    check(viol == viol0, "SRAM timing");
    check(m_conflict == 0, "masters never on the bus together");
    check(m_dsp_write > 0,  "mechanism: processor parameter writes");
    check(m_start == 2,     "mechanism: Start events");
    check(m_param_read == 2 * int'(P_LEN), "mechanism: Init parameter reads");
    check(m_step >= 2 * int'(NREC * XS), "mechanism: computing steps");
    check(m_store == 2 * int'(NREC), "mechanism: storage events");
    check(m_record == 2 * int'(NREC), "mechanism: records written");
    check(m_end == 2,       "mechanism: End events");
    check(m_table_read == 2 * int'(NREC * E_LEN), "mechanism: table reads");
    check(m_restart == 1,   "mechanism: restart from END");
    $display("mechanisms: dsp_writes=%0d starts=%0d param_reads=%0d steps=%0d stores=%0d records=%0d ends=%0d table_reads=%0d restarts=%0d",
             m_dsp_write, m_start, m_param_read, m_step, m_store, m_record, m_end, m_table_read, m_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
