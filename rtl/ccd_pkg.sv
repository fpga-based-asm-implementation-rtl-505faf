// ccd_pkg: types and constants shared by the CCD controller.
//
// Holds the state codes of the 12-state algorithmic state machine (the
// codes T0..T11 = 4'b0000..4'b1011 are the published state assignment),
// the positions of the control bits in the 24-bit command word A1 (bits
// 16..22, as used by the published transition table), the waveform
// sequence identifiers, the meaning of the 16 state bits D15..D0 and the
// index of each readout parameter. Only the state codes, the control-bit
// positions, the 24-bit word widths and the DCS bits SBIT11/SBIT12 follow
// the published description; the rest is this design's own choice.
package ccd_pkg;

  localparam int CMD_W   = 24;  // serial command word width
  localparam int SBITS_W = 16;  // waveform state bits D15..D0
  localparam int TIME_W  = 8;   // waveform time field (24 - 16)
  localparam int PIX_W   = 16;  // ADC sample width
  localparam int PAR_W   = 16;  // readout parameter width

  // ASM state assignment
  typedef enum logic [3:0] {
    T0_IDLE      = 4'b0000,
    T1_BOOTSTRAP = 4'b0001,
    T2_LOADDAC   = 4'b0010,
    T3_OUTDATA   = 4'b0011,
    T4_CLRROWS   = 4'b0100,
    T5_PREFLUSH  = 4'b0101,
    T6_GETPAR    = 4'b0110,
    T7_READROW   = 4'b0111,
    T8_PRESHIFT  = 4'b1000,
    T9_STRBDATA  = 4'b1001,
    T10_POSTSHIFT= 4'b1010,
    T11_RESET    = 4'b1011
  } asm_state_t;

  // Control bits of the command word A1 that the transition table tests
  localparam int A1_LOADDAC  = 16;  // T1 -> T2
  localparam int A1_OUTDATA  = 17;  // T2 -> T3
  localparam int A1_CLRROWS  = 18;  // T3 -> T4
  localparam int A1_GETPAR   = 19;  // T5 -> T6
  localparam int A1_RESET    = 20;  // T7 -> T11 once all rows are read
  localparam int A1_PREFLUSH = 21;  // T4 -> T5
  localparam int A1_READROW  = 22;  // T6 -> T7

  // Readout parameters written in GETPAR: index in A1[18:16], value in A1[15:0]
  typedef enum logic [2:0] {
    P_NROWS    = 3'd0,  // binned rows to read (NOOFBROWS)
    P_PBIN     = 3'd1,  // row (parallel) binning factor
    P_SBIN     = 3'd2,  // column (serial) binning factor
    P_NPIX     = 3'd3,  // binned pixels per row (BNSERIAL)
    P_PRESCAN  = 3'd4,  // rows discarded before the first read row
    P_PRESHIFT = 3'd5,  // serial shifts discarded before the first pixel (iSSO)
    P_POSTSHIFT= 3'd6,  // serial shifts discarded after the last pixel (iPOSTSHIFT)
    P_INTTIME  = 3'd7   // DCS integration time in clock cycles (bits 7:0)
  } par_idx_t;

  typedef struct packed {
    logic [PAR_W-1:0] nrows;
    logic [PAR_W-1:0] pbin;
    logic [PAR_W-1:0] sbin;
    logic [PAR_W-1:0] npix;
    logic [PAR_W-1:0] prescan;
    logic [PAR_W-1:0] preshift;
    logic [PAR_W-1:0] postshift;
    logic [TIME_W-1:0] inttime;
  } readout_par_t;

  // Waveform sequences played by the timing generator
  typedef enum logic [2:0] {
    SEQ_PARALLEL = 3'd0,  // one row transfer into the read-out register
    SEQ_SERIAL   = 3'd1,  // one serial shift of the read-out register
    SEQ_FLUSH    = 3'd2,  // dump of the whole array and read-out register
    SEQ_REF      = 3'd3,  // node reset and reference integration (DCS)
    SEQ_SIG      = 3'd4,  // signal integration (DCS)
    SEQ_DUMP     = 3'd5   // clear of the read-out register only
  } seq_t;

  // State bits D15..D0
  localparam int SB_P1   = 0;   // parallel clock phase 1
  localparam int SB_P2   = 1;   // parallel clock phase 2
  localparam int SB_P3   = 2;   // parallel clock phase 3
  localparam int SB_TG   = 3;   // transfer gate
  localparam int SB_S1   = 4;   // serial clock phase 1
  localparam int SB_S2   = 5;   // serial clock phase 2
  localparam int SB_S3   = 6;   // serial clock phase 3
  localparam int SB_SW   = 7;   // summing well
  localparam int SB_RG   = 8;   // output node reset gate
  localparam int SB_IRST = 9;   // DCS integrator reset
  localparam int SB_POL  = 11;  // SBIT11: DCS polarity, low = positive (reference)
  localparam int SB_INTN = 12;  // SBIT12: DCS integrate, low = integrating

  localparam logic [SBITS_W-1:0] SBITS_IDLE = 16'(1 << SB_INTN);

  localparam logic [7:0] ACK_BYTE = 8'hAA;

endpackage
