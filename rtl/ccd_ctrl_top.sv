// ccd_ctrl_top: FPGA front-end controller of a CCD camera.
//
// Replaces the DSP of a CCD camera controller by one clocked design. The host
// sends 24-bit commands on a serial link (`rx_sclk`, `rx_sdi`); cmd_rx frames
// them and hands them to the algorithmic state machine asm_ctrl, which runs
// the camera through its states (bootstrap, DAC load, static outputs, row
// clear, pre-flush, parameter load, read-out, reset). For every command that
// has been executed, ack_tx returns the byte AA on the serial Tx line
// (`tx_sclk`, `tx_sdo`). The read-out drives the CCD clocks and the DCS
// signal-chain controls through the timing generator wavegen, whose 16 state
// bits come out on `sbits` (D15..D0), starts the external ADC (`adc_start`,
// answered by `adc_done` with `adc_data`), and sends each 16-bit sample to
// the host on the 8-bit parallel port pix_port (`pd`, `pstb`).
//
// Outside the chip, and not part of this design: the CCD in its dewar, the
// preamplifier, the analog DCS integrator, the ADC, the DACs and clock
// drivers of the bias and clocks board, the line drivers of the link and the
// host computer. `dac_load`/`dac_data` and `gpo` are the controller's side of
// the bias board and of the static control lines.
//
// All blocks run on `clk` with an active-low asynchronous reset `rst_n`.
// `start` releases the state machine from IDLE. `state` shows the present
// ASM state code. The DCS integration time starts at INT_TIME and can be
// changed by the host with parameter word 7.
module ccd_ctrl_top
  import ccd_pkg::*;
#(
  parameter logic [TIME_W-1:0] INT_TIME = 8'd250,  // DCS integration time after reset, cycles
  parameter int unsigned       STB_W    = 4,       // parallel-port strobe width
  parameter int unsigned       TX_HALF  = 4        // half period of tx_sclk
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  // serial link to the host
  input  logic               rx_sclk,
  input  logic               rx_sdi,
  output logic               tx_sclk,
  output logic               tx_sdo,
  // parallel image-data port to the host
  output logic [7:0]         pd,
  output logic               pstb,
  // CCD clocks and signal-chain controls D15..D0
  output logic [SBITS_W-1:0] sbits,
  // ADC
  output logic               adc_start,
  input  logic               adc_done,
  input  logic [PIX_W-1:0]   adc_data,
  // bias and clocks board, static outputs
  output logic               dac_load,
  output logic [15:0]        dac_data,
  output logic [15:0]        gpo,
  // status
  output asm_state_t         state,
  output logic               ack_overflow
);

  logic             cmd_valid;
  logic [CMD_W-1:0] cmd_word;
  logic             ack;
  logic             wg_start, wg_busy, wg_done;
  seq_t             wg_seq;
  logic             pix_valid, pix_ready;
  logic [PIX_W-1:0] pix_data;
  logic [CMD_W-1:0] a1;
  logic             tx_busy;
  logic [TIME_W-1:0] int_time;

  cmd_rx u_rx (
    .clk, .rst_n,
    .sclk  (rx_sclk),
    .sdi   (rx_sdi),
    .word  (cmd_word),
    .valid (cmd_valid)
  );

  asm_ctrl #(.INT_TIME(INT_TIME)) u_asm (
    .clk, .rst_n, .start,
    .cmd_valid, .cmd_word, .ack,
    .wg_start, .wg_seq, .wg_done,
    .adc_start, .adc_done, .adc_data,
    .pix_valid, .pix_data, .pix_ready,
    .dac_load, .dac_data, .gpo, .int_time,
    .state, .a1
  );

  wavegen u_wg (
    .clk, .rst_n,
    .start    (wg_start),
    .seq      (wg_seq),
    .int_time (int_time),
    .sbits,
    .busy  (wg_busy),
    .done  (wg_done)
  );

  ack_tx #(.HALF(TX_HALF)) u_ack (
    .clk, .rst_n,
    .send     (ack),
    .tx_sclk,
    .tx_sdo,
    .busy     (tx_busy),
    .overflow (ack_overflow)
  );

  pix_port #(.STB_W(STB_W)) u_port (
    .clk, .rst_n,
    .in_valid (pix_valid),
    .in_data  (pix_data),
    .in_ready (pix_ready),
    .pd,
    .pstb
  );

endmodule
