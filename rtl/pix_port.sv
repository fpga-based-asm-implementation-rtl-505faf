// pix_port: 8-bit parallel image-data port with strobe.
//
// Takes one PIX_W-bit (16-bit) pixel at a time with a valid/ready handshake
// and sends it to the host as two bytes, high byte first, on `pd` with a
// strobe `pstb`. For each byte the data is set up one cycle before `pstb`
// rises, `pstb` stays high for STB_W cycles and the data is held one more
// cycle after it falls, so the host may latch on either strobe edge. A pixel
// occupies the port for 2*(STB_W+2) cycles; `in_ready` is high only while the
// port is idle. `pd` keeps the last byte when idle.
//
// The 8-bit width and the strobe follow the published description of the
// data link; the byte order, the strobe timing and the handshake towards the
// controller are this design's own choice.
module pix_port
  import ccd_pkg::*;
#(
  parameter int unsigned STB_W = 4   // strobe high time in clock cycles
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_data,
  output logic             in_ready,
  output logic [7:0]       pd,
  output logic             pstb
);

  localparam int SW = $clog2(STB_W + 1);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_STB, S_HOLD} pstate_t;

  pstate_t    st;
  logic [7:0] lo_byte;
  logic       second;
  logic [SW-1:0] cnt;

  assign in_ready = (st == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      lo_byte <= '0;
      second  <= 1'b0;
      cnt     <= '0;
      pd      <= '0;
      pstb    <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (in_valid) begin
          pd      <= in_data[PIX_W-1 -: 8];
          lo_byte <= in_data[7:0];
          second  <= 1'b0;
          st      <= S_SETUP;
        end
        S_SETUP: begin
          pstb <= 1'b1;
          cnt  <= '0;
          st   <= S_STB;
        end
        S_STB: begin
          if (cnt == SW'(STB_W - 1)) begin
            pstb <= 1'b0;
            st   <= S_HOLD;
          end else begin
            cnt <= cnt + SW'(1);
          end
        end
        S_HOLD: begin
          if (!second) begin
            pd     <= lo_byte;
            second <= 1'b1;
            st     <= S_SETUP;
          end else begin
            st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
