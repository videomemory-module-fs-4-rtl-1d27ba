// fs4_pkg: types and constants shared by the FS-4 frame-store controller.
//
// The frame store serves four kinds of VRAM cycle. Their codes below are
// ordered by priority (a larger code wins): the priority order write
// transfer > PC memory operation > display transfer > refresh follows the
// original module; the binary encoding is this design's own choice.
// The Input Status Register layout (WP1 WP0 DP1 DP0 MP1 MP0 - -) is the
// original control word. The VRAM control bundle carries the strobes of
// the Fujitsu MB81461 dual-port VRAM, active low as on the chip.
package fs4_pkg;

  // Memory-cycle slot: 8 clocks of 15 MHz = one period of 1.875 MHz.
  localparam int unsigned PHASES = 8;

  typedef enum logic [1:0] {
    OP_REFRESH = 2'd0,   // CAS-before-RAS refresh, internal row counter
    OP_DISPLAY = 2'd1,   // display transfer: RAM row -> SAM
    OP_MEMORY  = 2'd2,   // PC read or write of the RAM section
    OP_WRITE   = 2'd3    // write transfer: SAM -> RAM row
  } op_e;

  // One request bit per operation, indexed by op_e.
  typedef logic [3:0] req_t;

  typedef struct packed {
    logic ras_n;
    logic cas_n;
    logic troe_n;   // TR/OE: low at RAS fall = transfer, later low = output enable
    logic we_n;
    logic row;      // 1: row address on the VRAM address pins, 0: column
  } vram_ctrl_t;

  localparam vram_ctrl_t CTRL_IDLE = '{ras_n: 1'b1, cas_n: 1'b1, troe_n: 1'b1,
                                       we_n: 1'b1, row: 1'b1};

  // Input Status Register (control word written by the PC).
  typedef struct packed {
    logic [1:0] wp;      // bits 7:6 plane written from the camera
    logic [1:0] dp;      // bits 5:4 plane displayed
    logic [1:0] mp;      // bits 3:2 plane mapped into PC memory
    logic [1:0] unused;  // bits 1:0
  } isr_t;

endpackage
