// asm_ctrl: algorithmic state machine of the CCD controller.
//
// Twelve states T0..T11 with the published state codes (IDLE, BOOTSTRAP,
// LOADDAC, OUTDATA, CLRROWS, PREFLUSH, GETPAR, READROW, PRESHIFT, STRBDATA,
// POSTSHIFT, RESET). Every 24-bit command from the host is stored in the
// register A1. The published transition table is followed exactly:
//   T0 -start-> T1 -A1[16]-> T2 -A1[17]-> T3 -A1[18]-> T4 -A1[21]-> T5
//   -A1[19]-> T6 -A1[22]-> T7;  T7 -(rows left && no row-bin && no prescan
//   left)-> T8 -(no preshift left)-> T9 -(no binned pixel left)-> T10
//   -(no postshift left)-> T7;  T7 -(no rows left && A1[20])-> T11 -> T0.
// A control bit is cleared when its transition is taken. A state first does
// its own work and only then tests its exit condition; until that condition
// holds it waits, so the host steps the controller by sending commands.
//
// Work of each state (this design's reading of the state names):
//   T1  resets the readout parameters (integration time to INT_TIME) and
//       clears A1 (commands sent while the controller was idle are dropped).
//   T2  pulses `dac_load` with A1[15:0] on `dac_data` (bias/clock DACs).
//   T3  latches A1[15:0] onto the general-purpose outputs `gpo`.
//   T4  plays the row-transfer waveform A1[15:0] times (clears rows).
//   T5  plays the flush waveform A1[15:0] times (pre-flush).
//   T6  takes parameter words: any command without A1[22] writes A1[15:0]
//       into the parameter selected by A1[18:16] (see ccd_pkg::par_idx_t).
//       Parameter 7 is the DCS integration time in cycles, passed to the
//       timing generator on `int_time`; writing 0 restores INT_TIME.
//   T7  first discards PRESCAN rows (row transfer + read-out register
//       clear each), then for every binned row shifts PBIN rows into the
//       read-out register; leaving for T8 counts the row (NOOFBROWS - 1).
//   T8  discards PRESHIFT serial shifts (iSSO).
//   T9  reads NPIX binned pixels (BNSERIAL): node reset and reference
//       integration, SBIN serial shifts into the output node, signal
//       integration, one ADC conversion, and the sample out to the host port.
//   T10 discards POSTSHIFT serial shifts (iPOSTSHIFT).
//   T11 clears A1 and resets the parameters.
// `ack` pulses once for every finished piece of work that a command asked
// for (T2..T6 entry, each parameter word, a completed frame in T7, T11), so
// that the host receives AA after each executed command.
//
// Interfaces: waveform requests `wg_start`/`wg_seq` answered by `wg_done`;
// ADC conversion `adc_start` answered by `adc_done` with `adc_data`; pixel
// output `pix_valid`/`pix_data` accepted while `pix_ready` is high.
// The state codes and names, the transition table, the 24-bit A1 word and
// the order binning -> serial binning -> conversion follow the published
// description; the work assigned to T1..T6 and T11, the parameter-word format
// and the handshakes are this design's own choice.
module asm_ctrl
  import ccd_pkg::*;
#(
  parameter logic [TIME_W-1:0] INT_TIME = 8'd250   // integration time after reset
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  // commands
  input  logic               cmd_valid,
  input  logic [CMD_W-1:0]   cmd_word,
  output logic               ack,
  // timing generator
  output logic               wg_start,
  output seq_t               wg_seq,
  input  logic               wg_done,
  // analog-to-digital converter
  output logic               adc_start,
  input  logic               adc_done,
  input  logic [PIX_W-1:0]   adc_data,
  // pixel data towards the host port
  output logic               pix_valid,
  output logic [PIX_W-1:0]   pix_data,
  input  logic               pix_ready,
  // bias/clock board and static outputs
  output logic               dac_load,
  output logic [15:0]        dac_data,
  output logic [15:0]        gpo,
  output logic [TIME_W-1:0]  int_time,   // DCS integration time for the timing generator
  // status
  output asm_state_t         state,
  output logic [CMD_W-1:0]   a1
);

  typedef enum logic [2:0] {PX_REF, PX_SHIFT, PX_SIG, PX_CONV, PX_ADC, PX_OUT} px_t;

  readout_par_t     par;
  readout_par_t     par_init;
  logic             act_done;   // work of the present state finished
  logic             wg_wait;    // waiting for wg_done
  logic             dump_next;  // a discarded prescan row still needs a clear
  px_t              px;
  logic [15:0]      rep_left;
  logic [PAR_W-1:0] rows_left, pbin_left, prescan_left, sso_left, bn_left, sbin_left, post_left;

  always_comb begin
    par_init         = '0;
    par_init.inttime = INT_TIME;
  end

  assign int_time = par.inttime;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= T0_IDLE;
      a1           <= '0;
      par          <= par_init;
      act_done     <= 1'b0;
      wg_wait      <= 1'b0;
      dump_next    <= 1'b0;
      px           <= PX_REF;
      rep_left     <= '0;
      rows_left    <= '0;
      pbin_left    <= '0;
      prescan_left <= '0;
      sso_left     <= '0;
      bn_left      <= '0;
      sbin_left    <= '0;
      post_left    <= '0;
      ack          <= 1'b0;
      wg_start     <= 1'b0;
      wg_seq       <= SEQ_PARALLEL;
      adc_start    <= 1'b0;
      pix_valid    <= 1'b0;
      pix_data     <= '0;
      dac_load     <= 1'b0;
      dac_data     <= '0;
      gpo          <= '0;
    end else begin
      ack       <= 1'b0;
      wg_start  <= 1'b0;
      adc_start <= 1'b0;
      dac_load  <= 1'b0;

      if (wg_wait) begin
        if (wg_done) wg_wait <= 1'b0;
      end else begin
        unique case (state)
          T0_IDLE: if (start) begin
            state    <= T1_BOOTSTRAP;
            act_done <= 1'b0;
          end

          T1_BOOTSTRAP: if (!act_done) begin
            par      <= par_init;
            a1       <= '0;     // drop commands that arrived while idle
            act_done <= 1'b1;
          end else if (a1[A1_LOADDAC]) begin
            a1[A1_LOADDAC] <= 1'b0;
            state    <= T2_LOADDAC;
            act_done <= 1'b0;
          end

          T2_LOADDAC: if (!act_done) begin
            dac_load <= 1'b1;
            dac_data <= a1[15:0];
            ack      <= 1'b1;
            act_done <= 1'b1;
          end else if (a1[A1_OUTDATA]) begin
            a1[A1_OUTDATA] <= 1'b0;
            state    <= T3_OUTDATA;
            act_done <= 1'b0;
          end

          T3_OUTDATA: if (!act_done) begin
            gpo      <= a1[15:0];
            ack      <= 1'b1;
            act_done <= 1'b1;
          end else if (a1[A1_CLRROWS]) begin
            a1[A1_CLRROWS] <= 1'b0;
            rep_left <= a1[15:0];
            state    <= T4_CLRROWS;
            act_done <= 1'b0;
          end

          T4_CLRROWS: if (!act_done) begin
            if (rep_left != '0) begin
              wg_start <= 1'b1;
              wg_seq   <= SEQ_PARALLEL;
              wg_wait  <= 1'b1;
              rep_left <= rep_left - 16'd1;
            end else begin
              ack      <= 1'b1;
              act_done <= 1'b1;
            end
          end else if (a1[A1_PREFLUSH]) begin
            a1[A1_PREFLUSH] <= 1'b0;
            rep_left <= a1[15:0];
            state    <= T5_PREFLUSH;
            act_done <= 1'b0;
          end

          T5_PREFLUSH: if (!act_done) begin
            if (rep_left != '0) begin
              wg_start <= 1'b1;
              wg_seq   <= SEQ_FLUSH;
              wg_wait  <= 1'b1;
              rep_left <= rep_left - 16'd1;
            end else begin
              ack      <= 1'b1;
              act_done <= 1'b1;
            end
          end else if (a1[A1_GETPAR]) begin
            a1[A1_GETPAR] <= 1'b0;
            state    <= T6_GETPAR;
            act_done <= 1'b0;
          end

          T6_GETPAR: if (!act_done) begin
            ack      <= 1'b1;
            act_done <= 1'b1;
          end else if (a1[A1_READROW]) begin
            a1[A1_READROW] <= 1'b0;
            rows_left    <= par.nrows;
            prescan_left <= par.prescan;
            pbin_left    <= par.pbin;
            dump_next    <= 1'b0;
            state        <= T7_READROW;
            act_done     <= 1'b0;
          end

          T7_READROW: if (dump_next) begin
            wg_start  <= 1'b1;
            wg_seq    <= SEQ_DUMP;
            wg_wait   <= 1'b1;
            dump_next <= 1'b0;
          end else if (rows_left != '0) begin
            if (prescan_left != '0) begin
              wg_start     <= 1'b1;
              wg_seq       <= SEQ_PARALLEL;
              wg_wait      <= 1'b1;
              dump_next    <= 1'b1;
              prescan_left <= prescan_left - PAR_W'(1);
            end else if (pbin_left != '0) begin
              wg_start  <= 1'b1;
              wg_seq    <= SEQ_PARALLEL;
              wg_wait   <= 1'b1;
              pbin_left <= pbin_left - PAR_W'(1);
            end else begin
              rows_left <= rows_left - PAR_W'(1);
              sso_left  <= par.preshift;
              state     <= T8_PRESHIFT;
            end
          end else if (!act_done) begin
            ack      <= 1'b1;     // frame complete
            act_done <= 1'b1;
          end else if (a1[A1_RESET]) begin
            a1[A1_RESET] <= 1'b0;
            state    <= T11_RESET;
            act_done <= 1'b0;
          end

          T8_PRESHIFT: if (sso_left != '0) begin
            wg_start <= 1'b1;
            wg_seq   <= SEQ_SERIAL;
            wg_wait  <= 1'b1;
            sso_left <= sso_left - PAR_W'(1);
          end else begin
            bn_left <= par.npix;
            px      <= PX_REF;
            state   <= T9_STRBDATA;
          end

          T9_STRBDATA: if (bn_left == '0) begin
            post_left <= par.postshift;
            state     <= T10_POSTSHIFT;
          end else begin
            unique case (px)
              PX_REF: begin
                wg_start  <= 1'b1;
                wg_seq    <= SEQ_REF;
                wg_wait   <= 1'b1;
                sbin_left <= par.sbin;
                px        <= PX_SHIFT;
              end
              PX_SHIFT: if (sbin_left != '0) begin
                wg_start  <= 1'b1;
                wg_seq    <= SEQ_SERIAL;
                wg_wait   <= 1'b1;
                sbin_left <= sbin_left - PAR_W'(1);
              end else begin
                px <= PX_SIG;
              end
              PX_SIG: begin
                wg_start <= 1'b1;
                wg_seq   <= SEQ_SIG;
                wg_wait  <= 1'b1;
                px       <= PX_CONV;
              end
              PX_CONV: begin
                adc_start <= 1'b1;
                px        <= PX_ADC;
              end
              PX_ADC: if (adc_done) begin
                pix_data  <= adc_data;
                pix_valid <= 1'b1;
                px        <= PX_OUT;
              end
              PX_OUT: if (pix_ready) begin
                pix_valid <= 1'b0;
                bn_left   <= bn_left - PAR_W'(1);
                px        <= PX_REF;
              end
              default: px <= PX_REF;
            endcase
          end

          T10_POSTSHIFT: if (post_left != '0) begin
            wg_start  <= 1'b1;
            wg_seq    <= SEQ_SERIAL;
            wg_wait   <= 1'b1;
            post_left <= post_left - PAR_W'(1);
          end else begin
            pbin_left <= par.pbin;
            state     <= T7_READROW;
          end

          T11_RESET: begin
            par      <= par_init;
            a1       <= '0;
            ack      <= 1'b1;
            state    <= T0_IDLE;
            act_done <= 1'b0;
          end

          default: state <= T0_IDLE;
        endcase
      end

      // Commands: a new word replaces A1; in GETPAR a word without the
      // READROW bit is also a parameter write.
      if (cmd_valid) begin
        a1 <= cmd_word;
        if (state == T6_GETPAR && !cmd_word[A1_READROW]) begin
          ack <= 1'b1;
          unique case (par_idx_t'(cmd_word[18:16]))
            P_NROWS:     par.nrows     <= cmd_word[15:0];
            P_PBIN:      par.pbin      <= cmd_word[15:0];
            P_SBIN:      par.sbin      <= cmd_word[15:0];
            P_NPIX:      par.npix      <= cmd_word[15:0];
            P_PRESCAN:   par.prescan   <= cmd_word[15:0];
            P_PRESHIFT:  par.preshift  <= cmd_word[15:0];
            P_POSTSHIFT: par.postshift <= cmd_word[15:0];
            P_INTTIME:   par.inttime   <= (cmd_word[TIME_W-1:0] != '0) ? cmd_word[TIME_W-1:0]
                                                                      : INT_TIME;
            default: ;
          endcase
        end
      end
    end
  end

  // A pixel offered to the host port stays stable until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   pix_valid && !pix_ready |=> pix_valid && $stable(pix_data))
    else $error("asm_ctrl: pixel dropped before the port took it");

endmodule
