// ccb_pkg: types and constants shared by the CCB master and slave FPGA designs.
//
// The register map follows the CCB control and configuration register list:
// twenty 8-bit registers reached over the EPP parallel port, multi-byte
// registers stored most significant byte at the lower address.  The scan
// configuration struct is the State Generator's frozen snapshot of those
// registers, decoded into fields.  The header-info struct is the 100-bit
// bundle that the Dispatch Controller hands to the Frame Header.
package ccb_pkg;

  localparam int NREGS      = 20;   // registers 00..19
  localparam int REG_ABITS  = 5;    // address bits decoded by the register bank

  // Register addresses (address of the most significant byte).
  localparam int A_START_SCAN = 0;
  localparam int A_CAL_DIODE  = 1;
  localparam int A_SCAN_FLAGS = 2;
  localparam int A_STATE_LEN  = 3;  // 03..04
  localparam int A_BLANK_DT   = 5;
  localparam int A_DIODE_RISE = 6;  // 06..09
  localparam int A_DIODE_FALL = 10; // 10..11
  localparam int A_INTEG_LEN  = 12; // 12..13
  localparam int A_ROUNDTRIP  = 14;
  localparam int A_HOLDOFF    = 15;
  localparam int A_DUMP_ADC   = 16;
  localparam int A_DUMP_LIM   = 17; // 17..18
  localparam int A_ADC_DELAY  = 19;

  // Interrupt mask bit positions.
  localparam int IRQ_CAL = 0;
  localparam int IRQ_INT = 1;
  localparam int IRQ_SEC = 2;

  // Frame header constants.
  localparam int NHEADER        = 8;  // 16-bit header words
  localparam int WORDS_PER_SLAVE = 32; // 4 samplers x 4 bins x 2 halves
  localparam int NSLAVES        = 4;

  typedef logic [7:0] reg8_t;
  typedef reg8_t [NREGS-1:0] regfile_t;

  // scan_flags_reg bit assignments.
  typedef struct packed {
    logic [1:0] unused;
    logic close_b;
    logic close_a;
    logic switch_b;
    logic switch_a;
    logic dump;
    logic test;
  } scan_flags_t;

  // Decoded snapshot of the configuration registers.
  typedef struct packed {
    scan_flags_t flags;
    logic [15:0] state_len;
    logic [7:0]  blank_dt;
    logic [31:0] diode_rise;
    logic [15:0] diode_fall;
    logic [15:0] integ_len;
    logic [7:0]  roundtrip_dt;
    logic [4:0]  holdoff_dt;
    logic [1:0]  dump_slave;
    logic [1:0]  dump_sampler;
    logic [15:0] dump_lim;
    logic [3:0]  adc_delay;
  } scan_cfg_t;

  // Header information for one frame (100 bits, most significant first).
  typedef struct packed {
    logic [31:0] time_stamp;
    logic [31:0] scan_id;
    logic [31:0] integ_id;
    logic [1:0]  cal;
    logic        stable;
    logic        test;
  } hdr_info_t;

  function automatic scan_cfg_t decode_cfg(regfile_t r);
    scan_cfg_t c;
    c.flags        = scan_flags_t'(r[A_SCAN_FLAGS]);
    c.state_len    = {r[A_STATE_LEN], r[A_STATE_LEN+1]};
    c.blank_dt     = r[A_BLANK_DT];
    c.diode_rise   = {r[A_DIODE_RISE], r[A_DIODE_RISE+1], r[A_DIODE_RISE+2], r[A_DIODE_RISE+3]};
    c.diode_fall   = {r[A_DIODE_FALL], r[A_DIODE_FALL+1]};
    c.integ_len    = {r[A_INTEG_LEN], r[A_INTEG_LEN+1]};
    c.roundtrip_dt = r[A_ROUNDTRIP];
    c.holdoff_dt   = r[A_HOLDOFF][4:0];
    c.dump_slave   = r[A_DUMP_ADC][3:2];
    c.dump_sampler = r[A_DUMP_ADC][1:0];
    c.dump_lim     = {r[A_DUMP_LIM], r[A_DUMP_LIM+1]};
    c.adc_delay    = r[A_ADC_DELAY][3:0];
    return c;
  endfunction

endpackage
