// sys_bus -- the single shared system bus of the autonomous emulator.
//
// Two bus masters, the EmulCore ASIC and the DSP56600 processor, share one
// DSP56600-protocol bus to the SRAM (A[15:0], D[23:0], /MCS, /RD, /WR wired
// to the SRAM's A, D, /CS, /OE, /WE).  There is no arbiter: the masters keep
// off the bus by protocol, the processor while an emulation runs and the core
// before Start and after End.  On the board the lines are shared wires; here
// the active-low strobes are combined as a wired AND, the address comes from
// the master that holds /MCS low, and the data bus carries the word of the
// master whose data driver is on, otherwise the SRAM's output.  `d` is that
// value of D[23:0], seen by both masters.
//
// `conflict` is high when both masters select the memory or both drive D in
// the same cycle, which the bus rules forbid; an assertion reports it.
// The bus and its sharing rule follow the design; the conflict flag is this
// design's addition.  The block is purely combinational.
module sys_bus
  import emul_pkg::*;
(
  input  bus_req_t asic,      // EmulCore pins
  input  bus_req_t dsp,       // processor pins
  output bus_req_t mem,       // pins at the SRAM
  input  data_t    mem_q,     // SRAM data output
  output data_t    d,         // value on D[23:0]
  output logic     conflict
);

  logic asic_sel, dsp_sel;

  assign asic_sel = !asic.mcs_n;
  assign dsp_sel  = !dsp.mcs_n;
  assign conflict = (asic_sel && dsp_sel) || (asic.d_oe && dsp.d_oe);

  always_comb begin
    mem.mcs_n = asic.mcs_n & dsp.mcs_n;
    mem.rd_n  = asic.rd_n  & dsp.rd_n;
    mem.wr_n  = asic.wr_n  & dsp.wr_n;
    mem.a     = asic_sel ? asic.a : dsp_sel ? dsp.a : '0;
    mem.d_oe  = asic.d_oe | dsp.d_oe;
    mem.d     = asic.d_oe ? asic.d : dsp.d_oe ? dsp.d : '0;
    d         = mem.d_oe ? mem.d : mem_q;
  end

endmodule
