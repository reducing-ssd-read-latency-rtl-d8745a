// pes_pkg: types and constants shared by the program/erase-suspension flash logic.
//
// Holds the interface command set (read, program, erase, and the added program
// suspend/resume and erase suspend/resume commands), the operations the write state
// machine asks of the analog block and cell array, and the flash timing sets. The
// timing values are those of the SLC and MLC flash the design is built around (page
// read 10/25 us, program phase 20/20 us, verify 8/24 us, 5/15 ISPP iterations, erase
// pulse 1.5/3.3 ms, voltage reset 4 us, shadow-buffer load 3 us), converted to clock
// cycles at CLK_MHZ. The 100 MHz clock matches the 100 MHz controller-chip bus, which
// moves one byte per cycle, so a 4 KB page takes ~41 us on the bus. The clock rate, the
// maximum number of erase loops and all encodings are this design's own choices.
package pes_pkg;

  localparam int unsigned CLK_MHZ = 100;

  // Interface commands issued by the flash controller to the chip.
  typedef enum logic [2:0] {
    CMD_READ        = 3'd0,
    CMD_PROGRAM     = 3'd1,
    CMD_ERASE       = 3'd2,
    CMD_PGM_SUSPEND = 3'd3,
    CMD_PGM_RESUME  = 3'd4,
    CMD_ERS_SUSPEND = 3'd5,
    CMD_ERS_RESUME  = 3'd6
  } cmd_op_e;

  // Operations driven towards the analog block and cell array.
  typedef enum logic [2:0] {
    AOP_IDLE  = 3'd0,  // nothing biased
    AOP_READ  = 3'd1,  // page sense
    AOP_PGM   = 3'd2,  // ISPP program phase
    AOP_PVFY  = 3'd3,  // program verify phase
    AOP_ERS   = 3'd4,  // erase pulse
    AOP_EVFY  = 3'd5,  // erase verify
    AOP_VRST  = 3'd6,  // Op_voltage_reset: discharge the bias of the current operation
    AOP_VSET  = 3'd7   // re-apply the erase bias before a resumed erase pulse
  } arr_op_e;

  // Suspension strategy for program: Inter Phase Suspension or Intra Phase Cancelation.
  typedef enum logic {
    SUSP_IPC = 1'b0,
    SUSP_IPS = 1'b1
  } susp_mode_e;

  // Host request kinds seen by the controller-side scheduler.
  typedef enum logic [1:0] {
    REQ_READ  = 2'd0,
    REQ_WRITE = 2'd1,
    REQ_ERASE = 2'd2
  } req_op_e;

  // Flash timing, all in clock cycles except the two counts.
  typedef struct packed {
    int unsigned t_r_phy;          // page sense
    int unsigned t_w_program;      // program phase of one ISPP iteration
    int unsigned t_verify;         // verify phase (program and erase)
    int unsigned t_erase;          // erase pulse
    int unsigned t_voltage_reset;  // Op_voltage_reset at the end of every phase
    int unsigned t_buffer;         // shadow buffer -> page buffer restore
    int unsigned n_w_cycle;        // maximum ISPP iterations
    int unsigned n_erase_max;      // maximum erase pulse/verify loops
  } flash_timing_t;

  localparam flash_timing_t SLC_TIMING = '{
    t_r_phy:         10 * CLK_MHZ,
    t_w_program:     20 * CLK_MHZ,
    t_verify:         8 * CLK_MHZ,
    t_erase:       1500 * CLK_MHZ,
    t_voltage_reset:  4 * CLK_MHZ,
    t_buffer:         3 * CLK_MHZ,
    n_w_cycle:        5,
    n_erase_max:      4
  };

  localparam flash_timing_t MLC_TIMING = '{
    t_r_phy:         25 * CLK_MHZ,
    t_w_program:     20 * CLK_MHZ,
    t_verify:        24 * CLK_MHZ,
    t_erase:       3300 * CLK_MHZ,
    t_voltage_reset:  4 * CLK_MHZ,
    t_buffer:         3 * CLK_MHZ,
    n_w_cycle:       15,
    n_erase_max:      4
  };

  // Page geometry: MLC 4 KB page, SLC 2 KB page.
  localparam int unsigned MLC_PAGE_BYTES = 4096;
  localparam int unsigned SLC_PAGE_BYTES = 2048;

endpackage
