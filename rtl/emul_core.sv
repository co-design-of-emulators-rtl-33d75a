// emul_core -- EmulCore (PE1), the hardware side of the autonomous emulator.
//
// The core runs one emulation from a Start event to an End event without any
// help from the processor, which only prepares the shared memory beforehand
// and reads it afterwards:
//   IDLE  waits for Start, an asynchronous event from the DSP; it is taken
//         through a two-flop synchroniser and its rising edge starts a run.
//   INIT  the Init machine reads the P_LEN process parameters from memory
//         into the `params` registers used by the computing behaviours.
//   RUN   a clock generator issues the computing-step event `step` every
//         STEP_CYCLES clocks (1 us at 100 MHz); a second one counts XS steps
//         and issues the storage event, at which the Storage machine writes
//         the E_LEN `results` into the next locations of the results table.
//   END   after N_RECORDS records the bus is released and `end_irq` is raised
//         for the processor's interrupt input.  It stays high until the next
//         Start, which begins a new run at INIT.
// The core owns the bus only in INIT and RUN; in IDLE and END its strobes are
// high and it drives neither address nor data, so the processor can use the
// memory.  `bus` carries the outgoing pins, `rdata` the value on D[23:0].
//
// The sequence, the Start/End events, the Init and Storage machines and the
// 1 us step follow the design.  The synchroniser, the level End signal, the
// clock frequency, the table size and the address map are this design's
// choices.  Reset is active-low and synchronous.
module emul_core
  import emul_pkg::*;
#(
  parameter int unsigned P_LEN       = 8,         // parameter words
  parameter int unsigned E_LEN       = 8,         // result words per record
  parameter addr_t       PARAM_BASE  = 16'h0000,  // parameter vector address
  parameter addr_t       RESULT_BASE = 16'h0010,  // results table address
  parameter int unsigned N_RECORDS   = 1024,      // records per emulation
  parameter int unsigned STEP_CYCLES = 100,       // clocks per computing step
  parameter int unsigned XS          = 10,        // steps per storage period
  parameter int unsigned WAIT_CYCLES = 0          // extra strobe-low cycles
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_async,          // Start event from the processor
  output logic       end_irq,              // End event to the processor
  output bus_req_t   bus,
  input  data_t      rdata,
  output data_t      params  [P_LEN],      // process parameters P_i
  input  data_t      results [E_LEN],      // emulator outputs E_i
  output logic       step,                 // computing-step clock event
  output logic       store,                // storage-period clock event
  output logic       record_done,          // one record written
  output emu_phase_e phase,
  output logic [$clog2(N_RECORDS+1)-1:0] records
);

  emu_phase_e phase_q;
  logic [2:0] start_sync;     // two synchroniser flops and an edge flop
  logic       start_evt;
  logic       init_busy, init_done;
  logic       st_busy, st_full, st_overrun;
  logic       running;
  bus_req_t   init_bus, st_bus;

  assign phase     = phase_q;
  assign start_evt = start_sync[1] && !start_sync[2];
  assign running   = (phase_q == EMU_RUN);
  assign end_irq   = (phase_q == EMU_END);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start_sync <= '0;
      phase_q    <= EMU_IDLE;
    end else begin
      start_sync <= {start_sync[1:0], start_async};
      unique case (phase_q)
        EMU_IDLE, EMU_END: if (start_evt) phase_q <= EMU_INIT;
        EMU_INIT:          if (init_done) phase_q <= EMU_RUN;
        EMU_RUN:           if (st_full && !st_busy) phase_q <= EMU_END;
        default:           phase_q <= EMU_IDLE;
      endcase
    end
  end

  init_fsm #(
    .P_LEN(P_LEN), .PARAM_BASE(PARAM_BASE), .WAIT_CYCLES(WAIT_CYCLES)
  ) u_init (
    .clk, .rst_n,
    .start ((phase_q == EMU_INIT) && !init_busy && !init_done),
    .rdata,
    .bus   (init_bus),
    .params,
    .busy  (init_busy),
    .done  (init_done)
  );

  clock_gen #(.PERIOD(STEP_CYCLES)) u_step_clk (
    .clk, .rst_n, .clr(!running), .en(1'b1), .tick(step)
  );

  clock_gen #(.PERIOD(XS)) u_store_clk (
    .clk, .rst_n, .clr(!running), .en(step), .tick(store)
  );

  storage_fsm #(
    .E_LEN(E_LEN), .RESULT_BASE(RESULT_BASE), .N_RECORDS(N_RECORDS),
    .WAIT_CYCLES(WAIT_CYCLES)
  ) u_storage (
    .clk, .rst_n,
    .clr     (phase_q == EMU_INIT),
    .store   (running && store),
    .results,
    .bus     (st_bus),
    .busy    (st_busy),
    .done    (record_done),
    .full    (st_full),
    .overrun (st_overrun),
    .records
  );

  always_comb begin
    unique case (phase_q)
      EMU_INIT: bus = init_bus;
      EMU_RUN:  bus = st_bus;
      default:  bus = BUS_IDLE;
    endcase
  end

  // Bus rules: strobes only under /MCS, never /RD and /WR together, data
  // driven only in a write, and no bus cycle outside INIT and RUN.
  a_strobe_under_cs: assert property (@(posedge clk) disable iff (!rst_n)
      (!bus.rd_n || !bus.wr_n) |-> !bus.mcs_n)
    else $error("emul_core: strobe without /MCS");
  a_rd_wr_excl: assert property (@(posedge clk) disable iff (!rst_n)
      !(!bus.rd_n && !bus.wr_n))
    else $error("emul_core: /RD and /WR low together");
  a_drive_on_write: assert property (@(posedge clk) disable iff (!rst_n)
      bus.d_oe |-> bus.rd_n)
    else $error("emul_core: data driven during a read");
  a_bus_free: assert property (@(posedge clk) disable iff (!rst_n)
      (phase_q inside {EMU_IDLE, EMU_END}) |-> (bus.mcs_n && !bus.d_oe))
    else $error("emul_core: bus used outside an emulation");

  // A record must be written within one storage period.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !st_overrun)
    else $error("emul_core: storage event lost, Ts too short for E_LEN words");

endmodule
