// ack_tx: serial transmitter of the acknowledge byte.
//
// Each one-cycle pulse on `send` queues one acknowledge, the byte ACK_BYTE
// (8'hAA), for the host on the Tx line. The transmitter drives its own serial
// clock `tx_sclk`: for every bit, most significant first, `tx_sdo` is set
// while `tx_sclk` is low for HALF cycles, then `tx_sclk` is high for HALF
// cycles, so the host samples on the rising edge. A byte takes 16*HALF
// cycles; bytes queued back to back follow without a gap. Up to
// 2**QW - 1 acknowledges can wait; further requests while the queue is full
// are dropped and counted in `overflow`. `busy` is high while a byte is sent
// or waiting. Idle levels are `tx_sclk` high and `tx_sdo` low.
//
// That the controller answers each executed command with the pattern AA
// follows the published description; the clocking, the bit order and the
// queue are this design's own choice.
module ack_tx
  import ccd_pkg::*;
#(
  parameter int unsigned HALF = 4,   // half period of tx_sclk in clock cycles
  parameter int unsigned QW   = 3    // width of the pending counter
) (
  input  logic clk,
  input  logic rst_n,
  input  logic send,
  output logic tx_sclk,
  output logic tx_sdo,
  output logic busy,
  output logic overflow
);

  localparam int HW = $clog2(HALF + 1);

  logic [QW-1:0] pending;
  logic          active;
  logic [7:0]    shreg;
  logic [2:0]    bitn;
  logic          phase;   // 0: clock low half, 1: clock high half
  logic [HW-1:0] hcnt;
  logic          take;
  logic          byte_end;

  assign byte_end = active && phase && (hcnt == HW'(HALF - 1)) && (bitn == 3'd7);
  assign take     = (pending != '0) && (!active || byte_end);
  assign busy     = active || (pending != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= '0;
      active   <= 1'b0;
      shreg    <= '0;
      bitn     <= '0;
      phase    <= 1'b0;
      hcnt     <= '0;
      tx_sclk  <= 1'b1;
      tx_sdo   <= 1'b0;
      overflow <= 1'b0;
    end else begin
      // pending queue
      if (send && !take) begin
        if (pending == '1) overflow <= 1'b1;
        else               pending  <= pending + QW'(1);
      end else if (!send && take) begin
        pending <= pending - QW'(1);
      end

      if (take) begin
        active  <= 1'b1;
        shreg   <= ACK_BYTE;
        bitn    <= '0;
        phase   <= 1'b0;
        hcnt    <= '0;
        tx_sclk <= 1'b0;
        tx_sdo  <= ACK_BYTE[7];
      end else if (active) begin
        if (hcnt != HW'(HALF - 1)) begin
          hcnt <= hcnt + HW'(1);
        end else begin
          hcnt <= '0;
          if (!phase) begin
            phase   <= 1'b1;
            tx_sclk <= 1'b1;
          end else if (bitn == 3'd7) begin
            active  <= 1'b0;
            tx_sdo  <= 1'b0;
          end else begin
            phase   <= 1'b0;
            tx_sclk <= 1'b0;
            bitn    <= bitn + 3'd1;
            shreg   <= {shreg[6:0], 1'b0};
            tx_sdo  <= shreg[6];
          end
        end
      end
    end
  end

endmodule
