// dsp56600_model -- behavioural model of the processor side (not RTL).
//
// Stands for the DSP56600 and its software.  Bus tasks make single
// external-bus read and write cycles in whole clock periods: address and
// /MCS first, then /RD or /WR low for three cycles, write data driven from
// the first /WR-low cycle and held one cycle after /WR rises.  All pins
// change on the falling clock edge.  A task raises the Start event, and the
// interrupt flag F_end is set by the rising edge of the End input, as an
// edge-triggered interrupt handler would.  Between cycles the model leaves
// the bus with all strobes high.
module dsp56600_model
  import emul_pkg::*;
(
  input  logic     clk,
  input  data_t    d,        // value on the data bus
  input  logic     irq,      // End event
  output bus_req_t bus,
  output logic     start,
  output logic     f_end     // interrupt flag
);

  initial begin
    bus   = BUS_IDLE;
    start = 1'b0;
  end

  logic irq_q = 1'b0;

  // edge-triggered interrupt: the handler sets F_end; Start clears it
  always @(posedge clk) begin
    irq_q <= irq;
    if (start)              f_end <= 1'b0;
    else if (irq && !irq_q) f_end <= 1'b1;
  end

  task automatic write_word(input addr_t a, input data_t v);
    @(negedge clk); bus.a = a; bus.mcs_n = 1'b0;
    @(negedge clk); bus.wr_n = 1'b0; bus.d = v; bus.d_oe = 1'b1;
    @(negedge clk);
    @(negedge clk);
    @(negedge clk); bus.wr_n = 1'b1;
    @(negedge clk); bus.mcs_n = 1'b1; bus.d_oe = 1'b0;
    @(negedge clk); bus = BUS_IDLE;
  endtask

  task automatic read_word(input addr_t a, output data_t v);
    @(negedge clk); bus.a = a; bus.mcs_n = 1'b0;
    @(negedge clk); bus.rd_n = 1'b0;
    @(negedge clk);
    @(negedge clk);
    @(negedge clk); v = d; bus.rd_n = 1'b1;
    @(negedge clk); bus.mcs_n = 1'b1;
    @(negedge clk); bus = BUS_IDLE;
  endtask

  task automatic pulse_start(input int cycles);
    @(negedge clk); start = 1'b1;
    repeat (cycles) @(negedge clk);
    start = 1'b0;
  endtask

endmodule
