// emul_pkg -- types and constants shared by the autonomous emulator blocks.
//
// The system bus follows the DSP56600 external-bus pin set: a 16-bit address
// A[15:0], a 24-bit data bus D[23:0] and three active-low strobes /MCS, /RD
// and /WR, which connect straight to the SRAM pins /CS, /OE and /WE.  The
// widths are the ones printed on the bus drawings of the design.  A master's
// outgoing pins are bundled in bus_req_t; since the bus has no tri-state
// drivers inside the RTL, the data bus is split into an outgoing word with its
// own output enable (d_oe) and an incoming word returned by the bus.
package emul_pkg;

  localparam int unsigned ADDR_W = 16;  // A[15:0]
  localparam int unsigned DATA_W = 24;  // D[23:0]

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // Pins driven by one bus master (or by the bus towards the memory).
  typedef struct packed {
    addr_t a;       // address A[15:0]
    data_t d;       // data driven on D[23:0] when d_oe is set
    logic  d_oe;    // master drives D (write data phase)
    logic  mcs_n;   // /MCS, memory chip select (SRAM /CS)
    logic  rd_n;    // /RD, read strobe (SRAM /OE)
    logic  wr_n;    // /WR, write strobe (SRAM /WE)
  } bus_req_t;

  // Released bus: strobes high, no address or data driven.
  localparam bus_req_t BUS_IDLE = '{a: '0, d: '0, d_oe: 1'b0,
                                    mcs_n: 1'b1, rd_n: 1'b1, wr_n: 1'b1};

  // Phases of the EmulCore sequencer.
  typedef enum logic [1:0] {
    EMU_IDLE = 2'd0,  // waiting for the Start event
    EMU_INIT = 2'd1,  // Init SFSMD reads the parameters
    EMU_RUN  = 2'd2,  // computing steps run, Storage writes every Ts
    EMU_END  = 2'd3   // results table complete, End event raised
  } emu_phase_e;

endpackage
