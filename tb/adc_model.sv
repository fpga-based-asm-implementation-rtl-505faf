// adc_model: behavioural model of the external A/D converter (simulation
// only, not synthesizable).
//
// A one-cycle `convert` pulse starts a conversion; CONV_CYCLES clock cycles
// later `done` pulses for one cycle with the result on `data`. The result of
// the n-th conversion since reset is BASE + n*STEP, so that a testbench can
// predict every sample. The model also measures, from the DCS control bits
// SBIT11/SBIT12, how long the reference and the signal were integrated
// before each conversion and reports them on `ref_cycles`/`sig_cycles`.
module adc_model #(
  parameter int          CONV_CYCLES = 20,
  parameter logic [15:0] BASE        = 16'h4000,
  parameter logic [15:0] STEP        = 16'd37
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        convert,
  input  logic [15:0] sbits,
  output logic        done,
  output logic [15:0] data,
  output int          ref_cycles,
  output int          sig_cycles
);

  int          busy_cnt;
  logic [15:0] next_val;
  int          ref_acc, sig_acc;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_cnt   <= 0;
      next_val   <= BASE;
      done       <= 1'b0;
      data       <= '0;
      ref_acc    <= 0;
      sig_acc    <= 0;
      ref_cycles <= 0;
      sig_cycles <= 0;
    end else begin
      done <= 1'b0;
      if (!sbits[12] && !sbits[11]) ref_acc <= ref_acc + 1;
      if (!sbits[12] &&  sbits[11]) sig_acc <= sig_acc + 1;
      if (convert) begin
        busy_cnt   <= CONV_CYCLES;
        ref_cycles <= ref_acc;
        sig_cycles <= sig_acc;
        ref_acc    <= 0;
        sig_acc    <= 0;
      end else if (busy_cnt > 0) begin
        busy_cnt <= busy_cnt - 1;
        if (busy_cnt == 1) begin
          done     <= 1'b1;
          data     <= next_val;
          next_val <= next_val + STEP;
        end
      end
    end
  end

endmodule
