// cmd_rx: receiver for the 24-bit serial commands sent by the host.
//
// The host drives a serial clock `sclk` and data `sdi` (the Rx and Clock
// lines of the link). Both are synchronised into the controller clock with
// two flip-flops; on every rising edge of the synchronised `sclk` one bit of
// `sdi` is shifted in, most significant bit first. After 24 bits the word is
// presented on `word` with a one-cycle `valid` pulse, three to four controller
// cycles after the last rising `sclk` edge. If the host stops clocking in the
// middle of a word for FRAME_TIMEOUT controller cycles, the partial word is
// dropped so that the next word starts framed. `sclk` must stay high and low
// for at least two controller cycles each.
//
// The 24-bit command width and the three-line link (Tx, Rx, Clock) follow the
// published description. The bit order, the sampling edge, the direction of
// the clock and the framing timeout are this design's own choice.
module cmd_rx
  import ccd_pkg::*;
#(
  parameter int unsigned FRAME_TIMEOUT = 4096
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sclk,
  input  logic             sdi,
  output logic [CMD_W-1:0] word,
  output logic             valid
);

  localparam int CNT_W = $clog2(CMD_W + 1);
  localparam int TO_W  = $clog2(FRAME_TIMEOUT + 1);

  logic [2:0]       sclk_q;
  logic [1:0]       sdi_q;
  logic [CMD_W-1:0] shreg;
  logic [CNT_W-1:0] nbits;
  logic [TO_W-1:0]  idle;
  logic             rise;

  assign rise = sclk_q[1] & ~sclk_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_q <= '0;
      sdi_q  <= '0;
      shreg  <= '0;
      nbits  <= '0;
      idle   <= '0;
      word   <= '0;
      valid  <= 1'b0;
    end else begin
      sclk_q <= {sclk_q[1:0], sclk};
      sdi_q  <= {sdi_q[0], sdi};
      valid  <= 1'b0;
      if (rise) begin
        idle  <= '0;
        shreg <= {shreg[CMD_W-2:0], sdi_q[1]};
        if (nbits == CNT_W'(CMD_W - 1)) begin
          nbits <= '0;
          word  <= {shreg[CMD_W-2:0], sdi_q[1]};
          valid <= 1'b1;
        end else begin
          nbits <= nbits + CNT_W'(1);
        end
      end else if (nbits != '0) begin
        if (idle == TO_W'(FRAME_TIMEOUT)) begin
          nbits <= '0;
          idle  <= '0;
        end else begin
          idle <= idle + TO_W'(1);
        end
      end
    end
  end

endmodule
