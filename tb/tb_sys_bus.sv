// tb_sys_bus -- self-checking test of the shared bus.
//
// Random pin states of the two masters are applied; the SRAM pins, the data
// bus value and the conflict flag are compared with a reference written from
// the sharing rule: strobes wired-AND, address from the master holding /MCS,
// data from the master driving D, otherwise the SRAM output.  Directed cases
// cover each master alone, the idle bus and both kinds of conflict.
module tb_sys_bus;
  import emul_pkg::*;

  bus_req_t asic, dsp, mem;
  data_t    mem_q, d;
  logic     conflict;
  int       checks = 0, failures = 0;
  int       n_conflict = 0, n_asic = 0, n_dsp = 0;

  sys_bus dut (.asic, .dsp, .mem, .mem_q, .d, .conflict);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic compare();
    logic  e_cs, e_conf;
    addr_t e_a;
    data_t e_d;
    #1;
    e_cs   = asic.mcs_n && dsp.mcs_n;
    e_conf = (!asic.mcs_n && !dsp.mcs_n) || (asic.d_oe && dsp.d_oe);
    if (!asic.mcs_n)     e_a = asic.a;
    else if (!dsp.mcs_n) e_a = dsp.a;
    else                 e_a = '0;
    if (asic.d_oe)      e_d = asic.d;
    else if (dsp.d_oe)  e_d = dsp.d;
    else                e_d = mem_q;
    check(mem.mcs_n == e_cs, "/MCS");
    check(mem.rd_n == (asic.rd_n && dsp.rd_n), "/RD");
    check(mem.wr_n == (asic.wr_n && dsp.wr_n), "/WR");
    check(mem.a == e_a, "address");
    check(d == e_d, "data bus");
    check(mem.d_oe == (asic.d_oe || dsp.d_oe), "data driven");
    if (asic.d_oe || dsp.d_oe) check(mem.d == e_d, "write data at the SRAM");
    check(conflict == e_conf, "conflict");
    if (e_conf) n_conflict++;
    if (!asic.mcs_n && dsp.mcs_n) n_asic++;
    if (!dsp.mcs_n && asic.mcs_n) n_dsp++;
  endtask

  function automatic bus_req_t rnd();
    bus_req_t b;
    b.a     = addr_t'($urandom);
    b.d     = data_t'($urandom);
    b.d_oe  = 1'($urandom);
    b.mcs_n = 1'($urandom);
    b.rd_n  = 1'($urandom);
    b.wr_n  = 1'($urandom);
    return b;
  endfunction

  initial begin
    asic = BUS_IDLE; dsp = BUS_IDLE; mem_q = 24'h123456;
    compare();
    check(mem.mcs_n && mem.rd_n && mem.wr_n && d == 24'h123456, "idle bus reads SRAM output");
    asic = '{a: 16'h0011, d: 24'hABCDEF, d_oe: 1'b1, mcs_n: 1'b0, rd_n: 1'b1, wr_n: 1'b0};
    compare();
    check(mem.a == 16'h0011 && mem.d == 24'hABCDEF && !mem.wr_n && !conflict, "core write");
    asic = BUS_IDLE;
    dsp = '{a: 16'h7FF0, d: 24'h0, d_oe: 1'b0, mcs_n: 1'b0, rd_n: 1'b0, wr_n: 1'b1};
    mem_q = 24'h00BEEF;
    compare();
    check(mem.a == 16'h7FF0 && d == 24'h00BEEF && !mem.rd_n && !conflict, "processor read");
    asic.mcs_n = 1'b0;
    compare();
    check(conflict, "both select the memory");
    for (int i = 0; i < 2000; i++) begin
      asic = rnd(); dsp = rnd(); mem_q = data_t'($urandom);
      compare();
    end
    check(n_conflict > 0 && n_asic > 0 && n_dsp > 0, "all bus cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
