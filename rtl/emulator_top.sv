// emulator_top -- autonomous real-time emulator: EmulCore on the shared bus.
//
// The emulator replaces a power-electronic process (converter, motor/load,
// sensors) in real time.  Its hardware core runs on its own: the processor
// (a DSP56600) writes the process parameters into a shared SRAM and signals
// Start; the core reads them, computes one state step every microsecond and
// stores its output vector into a results table in the same SRAM once per
// storage period; when the table is full it raises End, the processor's
// interrupt, and the processor reads the table back.  This top joins the
// EmulCore to the single shared bus.  The processor and the SRAM are outside:
// the processor's bus pins come in on `dsp`, the SRAM's pins go out on `mem`
// with its data output on `mem_q`, and `d` is the value of the data bus.
// The computing behaviours (converter, motor/load model, sensors) are outside
// too: they take the loaded parameters `params` and the step event `step`,
// and return the emulator outputs `results`, which the core stores.
//
// Timing: one bus word takes 7 (read) or 8 (write) clocks of 10 ns at the
// default settings; see init_fsm and storage_fsm.  Reset is active-low,
// synchronous.  The structure follows the design; the parameter values other
// than the bus widths and the 1 us step are this design's choices.
module emulator_top
  import emul_pkg::*;
#(
  parameter int unsigned P_LEN       = 8,
  parameter int unsigned E_LEN       = 8,
  parameter addr_t       PARAM_BASE  = 16'h0000,
  parameter addr_t       RESULT_BASE = 16'h0010,
  parameter int unsigned N_RECORDS   = 1024,
  parameter int unsigned STEP_CYCLES = 100,
  parameter int unsigned XS          = 10,
  parameter int unsigned WAIT_CYCLES = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  // processor side
  input  logic       start,         // Start event
  output logic       end_irq,       // End event (processor interrupt)
  input  bus_req_t   dsp,           // processor bus pins
  output data_t      d,             // data bus value seen by the masters
  // SRAM side
  output bus_req_t   mem,           // SRAM pins (A, D, /CS, /OE, /WE)
  input  data_t      mem_q,         // SRAM data output
  // computing behaviours
  output data_t      params  [P_LEN],
  input  data_t      results [E_LEN],
  output logic       step,
  // status
  output logic       store,
  output logic       record_done,
  output emu_phase_e phase,
  output logic [$clog2(N_RECORDS+1)-1:0] records,
  output logic       conflict
);

  bus_req_t asic_bus;

  emul_core #(
    .P_LEN(P_LEN), .E_LEN(E_LEN), .PARAM_BASE(PARAM_BASE),
    .RESULT_BASE(RESULT_BASE), .N_RECORDS(N_RECORDS),
    .STEP_CYCLES(STEP_CYCLES), .XS(XS), .WAIT_CYCLES(WAIT_CYCLES)
  ) u_core (
    .clk, .rst_n,
    .start_async (start),
    .end_irq,
    .bus         (asic_bus),
    .rdata       (d),
    .params,
    .results,
    .step,
    .store,
    .record_done,
    .phase,
    .records
  );

  sys_bus u_bus (
    .asic  (asic_bus),
    .dsp,
    .mem,
    .mem_q,
    .d,
    .conflict
  );

  // Without bus management the two masters must take turns by protocol.
  a_one_master: assert property (@(posedge clk) disable iff (!rst_n) !conflict)
    else $error("emulator_top: processor and core on the bus together");

endmodule
