// trig_pkg: constants and configuration types shared by the Hall B trigger
// module. The design runs on a single 200 MHz clock (5 ns per cycle), so every
// programmable time in the register map is a count of clock cycles. The
// limits below are the register ranges of the board (delay 0..31, long delay
// 2..1023, persistence 0..7 and 0..255, prescale 0..1023, ST multiplicity
// up to 24). The byte addresses are the board's register map; the sizes of
// the configuration structs and the pipeline latencies are this design's own.
package trig_pkg;

  localparam int CLOCK_PERIOD_NS  = 5;
  localparam int N_SECTORS        = 6;
  localparam int N_TRIG           = 12;
  localparam int N_ST             = 24;
  localparam int MAX_PRESCALE     = 1023;
  localparam int MAX_DELAY_LONG   = 1023;
  localparam int MAX_DELAY        = 31;
  localparam int MAX_STMULT       = 24;
  localparam int MAX_PERSIST_LONG = 255;
  localparam int MAX_PERSIST      = 7;

  // Number of 32-bit scaler words from A_SCALER_BASE to TS_STMULT_SCALER.
  localparam int N_SCALER_WORDS   = 'h26C / 4;

  // ------------------------------------------------------------------
  // Register byte addresses (16-bit local bus offset)
  // ------------------------------------------------------------------
  localparam logic [15:0] A_SCOPE_DMA_LO   = 16'h0000; // 0x0000..0x0FFC: scope buffer (block reads)
  localparam logic [15:0] A_SCALER_BASE    = 16'h1000; // 0x1000..0x1268 scalers
  localparam logic [15:0] A_SCALER_LAST    = 16'h1268;
  localparam logic [15:0] A_BOARDIDS       = 16'h1300;
  localparam logic [15:0] A_REVISION       = 16'h1304;
  localparam logic [15:0] A_ENABLE_SCALERS = 16'h130C;
  localparam logic [15:0] A_DELAY_BASE     = 16'h2000; // 62 input delays
  localparam logic [15:0] A_PERSIST_BASE   = 16'h2100; // 12 trigger persistence
  localparam logic [15:0] A_PRESCALE_BASE  = 16'h2200; // 12 prescalers
  localparam logic [15:0] A_STOF_EN        = 16'h2300;
  localparam logic [15:0] A_TOF_DIS        = 16'h2304;
  localparam logic [15:0] A_STS_DIS        = 16'h2308;
  localparam logic [15:0] A_ECE_DIS        = 16'h230C;
  localparam logic [15:0] A_CC_DIS         = 16'h2310;
  localparam logic [15:0] A_ECC_EN         = 16'h2314;
  localparam logic [15:0] A_MORA_EN        = 16'h2408;
  localparam logic [15:0] A_MORB_EN        = 16'h240C;
  localparam logic [15:0] A_MOR_DIS        = 16'h2410;
  localparam logic [15:0] A_STMULT_THR     = 16'h2414;
  localparam logic [15:0] A_STMULT_DIS     = 16'h2418;
  localparam logic [15:0] A_L2_SECLOGIC    = 16'h2500;
  localparam logic [15:0] A_L2_OUTDELAY    = 16'h2504;
  localparam logic [15:0] A_L2_OUTWIDTH    = 16'h2508;
  localparam logic [15:0] A_TRIG_STATUS    = 16'h3000;
  localparam logic [15:0] A_TRIG_VALUE3    = 16'h3004; // VALUE3..0 at 3004..3010
  localparam logic [15:0] A_TRIG_IGNORE3   = 16'h3014; // IGNORE3..0 at 3014..3020
  localparam logic [15:0] A_LUT_ECC_BASE   = 16'h4000; // 12 x 0x200
  localparam logic [15:0] A_LUT_ECP_BASE   = 16'h5800; // 12 x 0x200
  localparam logic [15:0] A_LUT_L2_BASE    = 16'h7000; // 0x200 words
  localparam logic [15:0] A_TRIG_BUFFER    = 16'h7FFC;

  // Index of each input channel in the delay (0x2000 + 4*i) and scaler
  // (0x1000 + 4*i) maps.
  localparam int IDX_MORA   = 0;
  localparam int IDX_MORB   = 1;
  localparam int IDX_TOF    = 2;   // + sector-1
  localparam int IDX_ECINP  = 8;
  localparam int IDX_ECINE  = 14;
  localparam int IDX_ECTOTP = 20;
  localparam int IDX_ECTOTE = 26;
  localparam int IDX_CC     = 32;
  localparam int IDX_ST     = 38;  // + st-1, 24 channels
  localparam int N_INPUTS   = 62;

  // Scaler word indices ((address - 0x1000) / 4) beyond the input scalers.
  localparam int SIDX_LUT      = 'h128 / 4;
  localparam int SIDX_LUTMOR   = 'h158 / 4;
  localparam int SIDX_PERSIST  = 'h188 / 4;
  localparam int SIDX_PRESCALE = 'h1B8 / 4;
  localparam int SIDX_STS      = 'h1E8 / 4;
  localparam int SIDX_STOF     = 'h200 / 4;
  localparam int SIDX_ECP      = 'h218 / 4;
  localparam int SIDX_ECE      = 'h230 / 4;
  localparam int SIDX_ECC      = 'h248 / 4;
  localparam int SIDX_REF      = 'h260 / 4;
  localparam int SIDX_MORAB    = 'h264 / 4;
  localparam int SIDX_STMULT   = 'h268 / 4;

  // ------------------------------------------------------------------
  // Configuration of one sector (one bit of each sector register)
  // ------------------------------------------------------------------
  typedef struct packed {
    logic [3:0][4:0] st_delay;
    logic [4:0]      tof_delay;
    logic [4:0]      ecinp_delay;
    logic [4:0]      ectotp_delay;
    logic [4:0]      ecine_delay;
    logic [4:0]      ectote_delay;
    logic [4:0]      cc_delay;
    logic            stof_en;
    logic            tof_dis;
    logic            sts_dis;
    logic            ece_dis;
    logic            cc_dis;
    logic            ecc_en;
  } sector_cfg_t;

  // Configuration of one trigger bit
  typedef struct packed {
    logic [2:0] persist;
    logic [9:0] prescale;
    logic       mora_en;
    logic       morb_en;
    logic       mor_dis;
    logic       stmult_dis;
  } trig_cfg_t;

  // Common logic configuration
  typedef struct packed {
    logic [4:0] mora_delay;
    logic [4:0] morb_delay;
    logic [4:0] stmult_min;
    logic [4:0] stmult_max;
  } common_cfg_t;

  // Level-2 latch configuration
  typedef struct packed {
    logic [7:0] seclogic;   // 3:1 LUT contents, bit index = {ECC,ECP,STOF}
    logic [9:0] outdelay;   // 2..1023 cycles
    logic [7:0] outwidth;   // persistence 0..255 cycles
  } l2_cfg_t;

  // ------------------------------------------------------------------
  // Pipeline latencies, in clock cycles (this design's own choice).
  // Input pin to delay-line output with delay 0 is 1 cycle.
  // ------------------------------------------------------------------
  localparam int LAT_SECTOR   = 2;  // delay output -> STOF/ECP/ECC
  localparam int LAT_LUT      = 2;  // STOF/ECP/ECC -> LUT OR
  // MOR must meet the LUT OR: delay output -> LUT OR
  localparam int LAT_MOR      = LAT_SECTOR + LAT_LUT;
  // ST multiplicity must meet the LUT_MOR stage, one cycle later
  localparam int LAT_STMULT   = LAT_MOR + 1;

endpackage
