// bpm_pkg: widths, run-time configuration records and the register map shared
// by the BPM signal-processing firmware.
//
// The numbers that come from the design description are the 16-bit ADCs, the
// four RF channels, the 5th-order CIC with its 48-bit accumulators, the
// 8th-order decimate-by-2 compensation FIR, the two FIR stages of up to 1024
// taps with decimation 1..16, and the 512k-sample raw-data memory. Internal
// word widths (18-bit coefficients and mixer products, 24-bit filter data,
// a 27-bit NCO phase) and the register map are choices of this design.
package bpm_pkg;

  localparam int ADC_W      = 16;   // ADC sample width
  localparam int N_CH       = 4;    // RF channels (buttons A, B, C, D)
  localparam int MIX_W      = 18;   // mixer output width
  localparam int DATA_W     = 24;   // filter data width after the CIC
  localparam int COEF_W     = 18;   // FIR coefficient width (signed Q2.16)
  localparam int COEF_FRAC  = 16;
  localparam int GAIN_W     = 18;   // channel gain, unsigned Q2.16
  localparam int NCO_W      = 27;   // NCO phase accumulator width
  localparam int TRIG_W     = 18;   // NCO cosine/sine width
  localparam int AMP_W      = 24;   // CORDIC amplitude width (unsigned)
  localparam int ATT_W      = 6;    // RFFE attenuation code, 0.5 dB steps
  localparam int CIC_ORDER  = 5;
  localparam int CIC_ACC_W  = 48;
  localparam int FIR_TAPS_W = 11;   // holds 1..1024
  localparam int FIR_ADDR_W = 10;   // coefficient address inside one FIR
  localparam int FIR_DEC_W  = 5;    // holds 1..16

  typedef logic signed [ADC_W-1:0]  adc_t;
  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic        [AMP_W-1:0]  amp_t;

  // Run-time settings of one DDC (identical for all channels)
  typedef struct packed {
    logic [NCO_W-1:0]      nco_fcw;    // f_IF = fcw * f_s / 2^NCO_W
    logic [5:0]            cic_r;      // CIC decimation, 4..32
    logic [5:0]            cic_shift;  // right shift of the CIC output
    logic [FIR_DEC_W-1:0]  fir1_dec;   // 1..16
    logic [FIR_TAPS_W-1:0] fir1_taps;  // 1..1024, 1 = bypass
    logic [FIR_DEC_W-1:0]  fir2_dec;
    logic [FIR_TAPS_W-1:0] fir2_taps;
  } ddc_cfg_t;

  // Coefficient write, broadcast to the FIR1 or FIR2 of every I and Q path
  typedef struct packed {
    logic                  we;
    logic                  sel;        // 0: FIR1, 1: FIR2
    logic [FIR_ADDR_W-1:0] addr;
    coef_t                 data;
  } coef_wr_t;

  // Position calculation calibration
  typedef struct packed {
    logic [23:0] kx;   // horizontal geometry factor, mm, unsigned Q8.16
    logic [23:0] ky;   // vertical geometry factor
    logic [23:0] kq;   // charge scale, unsigned Q8.16
  } pos_cfg_t;

  // Register map (word addresses on the 12-bit register bus)
  localparam logic [11:0] REG_ID        = 12'h000;
  localparam logic [11:0] REG_CTRL      = 12'h001; // [0] capture arm (pulse) [1] capture trigger (pulse)
                                                   // [2] record enable [3] AGC enable [4] crossbar enable
                                                   // [5] temperature correction enable
  localparam logic [11:0] REG_NCO       = 12'h002;
  localparam logic [11:0] REG_CIC_R     = 12'h003;
  localparam logic [11:0] REG_CIC_SHIFT = 12'h004;
  localparam logic [11:0] REG_FIR1_DEC  = 12'h005;
  localparam logic [11:0] REG_FIR1_TAPS = 12'h006;
  localparam logic [11:0] REG_FIR2_DEC  = 12'h007;
  localparam logic [11:0] REG_FIR2_TAPS = 12'h008;
  localparam logic [11:0] REG_KX        = 12'h009;
  localparam logic [11:0] REG_KY        = 12'h00A;
  localparam logic [11:0] REG_KQ        = 12'h00B;
  localparam logic [11:0] REG_XB_PERIOD = 12'h00C; // crossbar period, output samples
  localparam logic [11:0] REG_XB_BLANK  = 12'h00D; // samples dropped after a switch
  localparam logic [11:0] REG_AGC_HI    = 12'h00E; // peak above: more attenuation
  localparam logic [11:0] REG_AGC_LO    = 12'h00F; // peak below: less attenuation
  localparam logic [11:0] REG_GAIN0     = 12'h010; // 0x010..0x013 channel gains
  localparam logic [11:0] REG_ATT0      = 12'h014; // 0x014..0x017 manual attenuation
  localparam logic [11:0] REG_TEMP_REF  = 12'h018; // calibration temperature, Q8.8 degrees
  localparam logic [11:0] REG_TK0       = 12'h01C; // 0x01C..0x01F temperature coefficients
  localparam logic [11:0] REG_STATUS    = 12'h020; // RO [0] capture done [1] capture busy
                                                   // [2] FIR overrun seen [3] crossbar state
  localparam logic [11:0] REG_POS_X     = 12'h021; // RO
  localparam logic [11:0] REG_POS_Y     = 12'h022; // RO
  localparam logic [11:0] REG_CHARGE    = 12'h023; // RO
  localparam logic [11:0] REG_REC_PTR   = 12'h024; // RO record write pointer
  localparam logic [11:0] REG_REC_DROP  = 12'h025; // RO dropped records
  localparam logic [11:0] REG_CAP_ADDR  = 12'h026; // write: read raw memory at this address
  localparam logic [11:0] REG_CAP_LO    = 12'h027; // RO raw word, channels 0,1
  localparam logic [11:0] REG_CAP_HI    = 12'h028; // RO raw word, channels 2,3
  localparam logic [11:0] REG_TEMP      = 12'h029; // RO front-end temperature, Q8.8 degrees
  localparam logic [11:0] REG_AMP0      = 12'h030; // RO 0x030..0x033 amplitudes
  localparam logic [11:0] REG_ATT_RB0   = 12'h034; // RO 0x034..0x037 applied attenuation
  localparam logic [11:0] REG_FIR1_COEF = 12'h800; // 0x800..0xBFF
  localparam logic [11:0] REG_FIR2_COEF = 12'hC00; // 0xC00..0xFFF
  localparam logic [31:0] BPM_ID        = 32'h5B9B_0001;

  // Saturate a wide signed value to DATA_W bits
  function automatic data_t sat_data(input logic signed [63:0] v);
    localparam logic signed [63:0] MAXV = 64'sd2 ** (DATA_W - 1) - 1;
    localparam logic signed [63:0] MINV = -(64'sd2 ** (DATA_W - 1));
    if (v > MAXV)      return data_t'(MAXV);
    else if (v < MINV) return data_t'(MINV);
    else               return data_t'(v);
  endfunction

endpackage
