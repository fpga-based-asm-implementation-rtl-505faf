// wavegen: CCD timing generator.
//
// A waveform is a sequence of 24-bit words. Each word combines a time field
// (bits 23:16) with the levels of the 16 state bits D15..D0 (bits 15:0):
// the state bits are held on `sbits` for `time` clock cycles, then the next
// word follows. A word whose time field is zero ends the sequence. Between
// sequences the outputs rest at SBITS_IDLE. The word tables of the six
// sequences (row transfer, serial shift, flush of the whole CCD, clear of the
// read-out register, DCS reference and DCS signal)
// are computed by the function `wave_word` below rather than read from a file.
//
// Interface: pulse `start` for one cycle with `seq` selecting the sequence
// while `busy` is low. The first word appears on `sbits` the next cycle;
// `done` pulses for one cycle after the last word's time has run out, in the
// same cycle `busy` falls. A sequence therefore takes exactly the sum of its
// time fields plus one cycle from `start` to `done`.
//
// The 24-bit word made of a time field and 16 state bits, and the DCS bits
// SBIT11 (polarity, low while the reference is integrated, high for the
// signal) and SBIT12 (low while integrating), follow the published
// description, as does the equal integration time for reference and signal.
// The placement of the time field in the upper byte, the zero-time end marker,
// the assignment of the other state bits and the shapes and times of the
// clock patterns are this design's own choice. The integration time comes in
// on `int_time` and is sampled when a sequence starts and between words; it
// must not be zero and should only change while `busy` is low. 250 cycles
// give 5 us of integration at an assumed 50 MHz clock.
module wavegen
  import ccd_pkg::*;
#(
  parameter logic [TIME_W-1:0] PAR_TIME = 8'd8,    // one step of a row transfer
  parameter logic [TIME_W-1:0] SER_TIME = 8'd2,    // one step of a serial shift
  parameter logic [TIME_W-1:0] FLS_TIME = 8'd16    // one step of a flush
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  seq_t               seq,
  input  logic [TIME_W-1:0]  int_time,   // DCS integration time, cycles (1..255)
  output logic [SBITS_W-1:0] sbits,
  output logic               busy,
  output logic               done
);

  localparam int IDX_W = 3;

  function automatic logic [SBITS_W-1:0] b(input int i);
    return SBITS_W'(1) << i;
  endfunction

  // Word `idx` of sequence `s`: {time, state bits}. time == 0 ends it.
  function automatic logic [CMD_W-1:0] wave_word(input seq_t s, input logic [IDX_W-1:0] idx);
    logic [SBITS_W-1:0] idl;
    logic [TIME_W-1:0]  t;
    logic [SBITS_W-1:0] v;
    idl = SBITS_IDLE;
    t   = '0;
    v   = idl;
    unique case (s)
      SEQ_PARALLEL: begin  // three-phase row transfer, last phase through TG
        t = PAR_TIME;
        case (idx)
          3'd0: v = idl | b(SB_P1) | b(SB_P2);
          3'd1: v = idl | b(SB_P2);
          3'd2: v = idl | b(SB_P2) | b(SB_P3) | b(SB_TG);
          3'd3: v = idl | b(SB_P3) | b(SB_TG);
          3'd4: v = idl | b(SB_P3) | b(SB_P1);
          3'd5: v = idl | b(SB_P1);
          default: t = '0;
        endcase
      end
      SEQ_SERIAL: begin  // three-phase serial shift into the summing well
        t = SER_TIME;
        case (idx)
          3'd0: v = idl | b(SB_S1) | b(SB_S2) | b(SB_SW);
          3'd1: v = idl | b(SB_S2) | b(SB_SW);
          3'd2: v = idl | b(SB_S2) | b(SB_S3) | b(SB_SW);
          3'd3: v = idl | b(SB_S3) | b(SB_SW);
          3'd4: v = idl | b(SB_S3) | b(SB_S1);
          3'd5: v = idl | b(SB_S1);
          default: t = '0;
        endcase
      end
      SEQ_FLUSH: begin  // all clocks and the reset gate together, twice
        t = FLS_TIME;
        case (idx)
          3'd0, 3'd2: v = idl | b(SB_P1) | b(SB_P2) | b(SB_P3) | b(SB_TG) | b(SB_S1)
                              | b(SB_S2) | b(SB_S3) | b(SB_SW) | b(SB_RG);
          3'd1, 3'd3: v = idl | b(SB_P2) | b(SB_S2) | b(SB_RG);
          default: t = '0;
        endcase
      end
      SEQ_REF: begin  // reset node and integrator, integrate reference positively
        case (idx)
          3'd0: begin t = SER_TIME; v = idl | b(SB_RG) | b(SB_IRST); end
          3'd1: begin t = SER_TIME; v = idl | b(SB_IRST); end
          3'd2: begin t = int_time; v = '0; end                   // SBIT11 low, SBIT12 low
          3'd3: begin t = 8'd1;     v = idl; end
          default: t = '0;
        endcase
      end
      SEQ_SIG: begin  // dump the summing well, integrate signal negatively
        case (idx)
          3'd0: begin t = SER_TIME; v = idl; end                   // summing well low
          3'd1: begin t = int_time; v = b(SB_POL); end             // SBIT11 high, SBIT12 low
          3'd2: begin t = 8'd1;     v = idl | b(SB_POL); end
          default: t = '0;
        endcase
      end
      SEQ_DUMP: begin  // serial clocks and reset gate high, read-out register to drain
        t = FLS_TIME;
        case (idx)
          3'd0: v = idl | b(SB_S1) | b(SB_S2) | b(SB_S3) | b(SB_SW) | b(SB_RG);
          3'd1: v = idl | b(SB_RG);
          default: t = '0;
        endcase
      end
      default: t = '0;
    endcase
    return {t, v};
  endfunction

  seq_t              cur_seq;
  logic [IDX_W-1:0]  idx;
  logic [TIME_W-1:0] tcnt;
  logic [CMD_W-1:0]  nxt_word;

  always_comb nxt_word = wave_word(cur_seq, idx + IDX_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_seq <= SEQ_PARALLEL;
      idx     <= '0;
      tcnt    <= '0;
      sbits   <= SBITS_IDLE;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          logic [CMD_W-1:0] w0;
          w0      = wave_word(seq, '0);
          cur_seq <= seq;
          idx     <= '0;
          if (w0[CMD_W-1 -: TIME_W] == '0) begin
            done <= 1'b1;
          end else begin
            busy  <= 1'b1;
            tcnt  <= w0[CMD_W-1 -: TIME_W];
            sbits <= w0[SBITS_W-1:0];
          end
        end
      end else if (tcnt > TIME_W'(1)) begin
        tcnt <= tcnt - TIME_W'(1);
      end else if (nxt_word[CMD_W-1 -: TIME_W] != '0) begin
        idx   <= idx + IDX_W'(1);
        tcnt  <= nxt_word[CMD_W-1 -: TIME_W];
        sbits <= nxt_word[SBITS_W-1:0];
      end else begin
        busy  <= 1'b0;
        done  <= 1'b1;
        sbits <= SBITS_IDLE;
      end
    end
  end

  // A new sequence may only be requested while the generator is idle
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("wavegen: start while busy");

endmodule
