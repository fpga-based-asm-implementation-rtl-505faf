// tb_ccd_ctrl_top: end-to-end testbench of the CCD controller.
//
// Runs the whole controller with its default parameters against a host model
// and an ADC model. The host bit-bangs 24-bit commands on the serial Rx line,
// collects the acknowledge bytes from the Tx line and the image bytes from the
// parallel port. One complete operation is run twice with different readout
// parameters: start, DAC load, static outputs, row clear, pre-flush,
// parameter load, read-out of a binned region of interest, reset.
//
// Checked against values worked out here:
//   - the state codes reached and their order;
//   - the DAC word and the static outputs;
//   - every pixel value and its order (from the ADC model's predictable
//     sequence);
//   - the number of row transfers, serial shifts and flushes seen on the CCD
//     clock lines (TG rising with S1 low, S3 rising with RG low, RG rising
//     with P1 high);
//   - DCS: reference and signal integrated for the same time per pixel, the
//     default 250 cycles in the first operation and 100 cycles, set by a
//     parameter word, in the second;
//   - one AA byte for every executed command.
// Each mechanism (every state, row binning, column binning, prescan, preshift,
// postshift, waiting for a control bit, one command word carrying two control
// bits, DCS, a changed integration time, acknowledges queued behind one
// another) is counted, and one that
// never happened counts as a failure.
module tb_ccd_ctrl_top;
  import ccd_pkg::*;

  localparam int INT_TIME = 250;   // the controller's default
  localparam int RX_HALF  = 3;     // host serial clock half period
  localparam int TX_HALF  = 4;     // the controller's default acknowledge clock

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic rx_sclk = 1'b0;
  logic rx_sdi = 1'b0;
  logic tx_sclk, tx_sdo;
  logic [7:0] pd;
  logic pstb;
  logic [15:0] sbits;
  logic adc_start, adc_done;
  logic [15:0] adc_data;
  logic dac_load;
  logic [15:0] dac_data, gpo;
  asm_state_t state;
  logic ack_overflow;
  int ref_cycles, sig_cycles;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  ccd_ctrl_top dut (
    .clk, .rst_n, .start, .rx_sclk, .rx_sdi, .tx_sclk, .tx_sdo, .pd, .pstb,
    .sbits, .adc_start, .adc_done, .adc_data, .dac_load, .dac_data, .gpo,
    .state, .ack_overflow
  );

  adc_model #(.CONV_CYCLES(20), .BASE(16'h4000), .STEP(16'd37)) u_adc (
    .clk, .rst_n, .convert(adc_start), .sbits, .done(adc_done), .data(adc_data),
    .ref_cycles, .sig_cycles
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- monitors (sampled at the falling clock edge) ----------
  int n_ack = 0, n_ack_bad = 0, ack_bits = 0;
  logic [7:0] ack_sh;
  logic tx_sclk_d = 1'b1;
  logic [15:0] pixels [$];
  logic [7:0] hi_byte;
  int nbyte = 0;
  logic pstb_d = 1'b0;
  logic [15:0] sb_d = SBITS_IDLE;
  int n_par = 0, n_ser = 0, n_fls = 0;
  int n_dcs = 0, n_dcs_bad = 0;
  int exp_int = INT_TIME;         // integration time expected at the next conversion
  int n_int_changed = 0;
  int visits [12];
  logic [3:0] st_log [$];
  logic [3:0] st_prev = 4'hF;
  int n_dac = 0;
  logic [15:0] last_dac;
  int n_ack_queue = 0;
  longint cyc = 0, last_rise = 0;

  always @(negedge clk) if (rst_n) begin
    // acknowledges
    tx_sclk_d <= tx_sclk;
    cyc <= cyc + 1;
    if (tx_sclk && !tx_sclk_d) begin
      // a byte that starts one bit period after the previous one was queued
      if (ack_bits == 0 && n_ack > 0 && cyc - last_rise <= 2 * TX_HALF) n_ack_queue++;
      last_rise = cyc;
      ack_sh = {ack_sh[6:0], tx_sdo};
      ack_bits++;
      if (ack_bits == 8) begin
        ack_bits = 0;
        n_ack++;
        if (ack_sh != ACK_BYTE) n_ack_bad++;
      end
    end
    // pixels
    pstb_d <= pstb;
    if (pstb && !pstb_d) begin
      if (nbyte == 0) hi_byte = pd;
      else pixels.push_back({hi_byte, pd});
      nbyte = 1 - nbyte;
    end
    // CCD clocks
    sb_d <= sbits;
    if (sbits[SB_TG] && !sb_d[SB_TG] && !sbits[SB_S1]) n_par++;
    if (sbits[SB_S3] && !sb_d[SB_S3] && !sbits[SB_RG]) n_ser++;
    if (sbits[SB_RG] && !sb_d[SB_RG] && sbits[SB_P1]) n_fls++;
    // DCS check at every conversion (model latches the integration times)
    if (adc_done) begin
      n_dcs++;
      if (ref_cycles != exp_int || sig_cycles != exp_int) n_dcs_bad++;
      if (exp_int != INT_TIME) n_int_changed++;
    end
    // DAC
    if (dac_load) begin
      n_dac++;
      last_dac = dac_data;
    end
    // states
    if (4'(state) != st_prev) begin
      st_log.push_back(4'(state));
      if (int'(state) < 12) visits[int'(state)]++;
    end
    st_prev <= 4'(state);
  end

  // ---------------- host serial link ----------------
  task automatic send_cmd(logic [23:0] w);
    for (int i = 23; i >= 0; i--) begin
      @(negedge clk);
      rx_sdi  = w[i];
      rx_sclk = 1'b0;
      repeat (RX_HALF) @(negedge clk);
      rx_sclk = 1'b1;
      repeat (RX_HALF) @(negedge clk);
    end
    repeat (8) @(negedge clk);
  endtask

  function automatic logic [23:0] bitw(int b, logic [15:0] payload);
    return (24'd1 << b) | {8'd0, payload};
  endfunction

  function automatic logic [23:0] parw(par_idx_t i, int v);
    return {5'd0, 3'(i), 16'(v)};
  endfunction

  task automatic wait_state(asm_state_t s, int maxc);
    int c = 0;
    while (state != s && c < maxc) begin
      @(negedge clk);
      c++;
    end
    chk(state == s, $sformatf("reached %s", s.name()));
  endtask

  task automatic wait_cycles_quiet(int n);
    // n cycles with the CCD clocks at rest, no strobe and no acknowledge
    int q = 0;
    while (q < n) begin
      @(negedge clk);
      if (sbits == SBITS_IDLE && !pstb && tx_sclk && !tx_sdo) q++;
      else q = 0;
    end
  endtask

  int n_wait_seen = 0;
  logic [15:0] adc_next = 16'h4000;

  task automatic operation(bit chain, int nclr, int nfls, int nr, int pb, int sb, int np,
                           int pre, int psh, int post, int it);
    logic [15:0] dacw = 16'($urandom);
    logic [15:0] gpow = 16'($urandom);
    logic [15:0] exp_pix [$];
    logic [3:0]  exp_st [$];
    int a0 = n_ack, p0 = n_par, s0 = n_ser, f0 = n_fls;
    bit ok;
    pixels.delete();
    st_log.delete();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait_state(T1_BOOTSTRAP, 100);
    send_cmd(bitw(A1_OUTDATA, 0));          // not the bit BOOTSTRAP waits for
    wait_cycles_quiet(20);
    if (state == T1_BOOTSTRAP) n_wait_seen++;
    chk(state == T1_BOOTSTRAP, "BOOTSTRAP waits for A1[16]");
    if (chain) begin
      // one word steps through LOADDAC and OUTDATA: two acknowledges at once
      gpow = dacw;
      send_cmd(bitw(A1_LOADDAC, dacw) | bitw(A1_OUTDATA, dacw));
      wait_state(T3_OUTDATA, 100);
    end else begin
      send_cmd(bitw(A1_LOADDAC, dacw));
      wait_state(T2_LOADDAC, 100);
      send_cmd(bitw(A1_OUTDATA, gpow));
      wait_state(T3_OUTDATA, 100);
    end
    send_cmd(bitw(A1_CLRROWS, 16'(nclr)));
    wait_state(T4_CLRROWS, 100);
    wait_cycles_quiet(20);
    send_cmd(bitw(A1_PREFLUSH, 16'(nfls)));
    wait_state(T5_PREFLUSH, 100);
    wait_cycles_quiet(20);
    send_cmd(bitw(A1_GETPAR, 0));
    wait_state(T6_GETPAR, 100);
    send_cmd(parw(P_NROWS, nr));
    send_cmd(parw(P_PBIN, pb));
    send_cmd(parw(P_SBIN, sb));
    send_cmd(parw(P_NPIX, np));
    send_cmd(parw(P_PRESCAN, pre));
    send_cmd(parw(P_PRESHIFT, psh));
    send_cmd(parw(P_POSTSHIFT, post));
    if (it != 0) send_cmd(parw(P_INTTIME, it));
    exp_int = (it != 0) ? it : INT_TIME;
    send_cmd(bitw(A1_READROW, 0));
    wait_state(T7_READROW, 100);
    wait_cycles_quiet(200);
    chk(state == T7_READROW, "frame read, waiting in READROW");
    send_cmd(bitw(A1_RESET, 0));
    wait_state(T0_IDLE, 100);
    wait_cycles_quiet(50);

    // expected results
    chk(last_dac == dacw, $sformatf("DAC word %h, expected %h", last_dac, dacw));
    chk(gpo == gpow, $sformatf("static outputs %h, expected %h", gpo, gpow));
    for (int i = 0; i < nr * np; i++) begin
      exp_pix.push_back(adc_next);
      adc_next = adc_next + 16'd37;
    end
    ok = (pixels.size() == exp_pix.size());
    for (int i = 0; ok && i < exp_pix.size(); i++) ok = (pixels[i] == exp_pix[i]);
    chk(ok, $sformatf("%0d pixels, expected %0d, values in order", pixels.size(), exp_pix.size()));
    chk(n_par - p0 == nclr + (nr > 0 ? pre : 0) + nr * pb,
        $sformatf("row transfers %0d, expected %0d", n_par - p0, nclr + pre + nr * pb));
    chk(n_ser - s0 == nr * (psh + np * sb + post),
        $sformatf("serial shifts %0d, expected %0d", n_ser - s0, nr * (psh + np * sb + post)));
    chk(n_fls - f0 == nfls, $sformatf("flushes %0d, expected %0d", n_fls - f0, nfls));
    // 5 commands + GETPAR + 7 parameters + frame + reset
    chk(n_ack - a0 == 14 + (it != 0 ? 1 : 0),
        $sformatf("acknowledges %0d, expected %0d", n_ack - a0, 14 + (it != 0 ? 1 : 0)));
    exp_st = '{4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111};
    for (int r = 0; r < nr; r++) begin
      exp_st.push_back(4'b1000);
      exp_st.push_back(4'b1001);
      exp_st.push_back(4'b1010);
      exp_st.push_back(4'b0111);
    end
    exp_st.push_back(4'b1011);
    exp_st.push_back(4'b0000);
    ok = (st_log.size() == exp_st.size());
    for (int i = 0; ok && i < exp_st.size(); i++) ok = (st_log[i] == exp_st[i]);
    chk(ok, $sformatf("state trace %p, expected %p", st_log, exp_st));
  endtask

  initial begin
    longint t0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    chk(state == T0_IDLE && sbits == SBITS_IDLE && pstb == 1'b0 && tx_sclk, "idle after reset");
    // chain nclr nfls nrows pbin sbin npix prescan preshift postshift inttime
    operation(0, 3, 1, 3, 2, 2, 5, 2, 3, 2, 0);
    operation(1, 0, 2, 2, 1, 3, 4, 0, 0, 1, 100);
    chk(n_ack_bad == 0, $sformatf("%0d acknowledge bytes were not AA", n_ack_bad));
    chk(!ack_overflow, "no acknowledge lost");
    chk(n_dcs_bad == 0 && n_dcs > 0, $sformatf("DCS: %0d of %0d pixels with unequal integration",
                                              n_dcs_bad, n_dcs));
    // every mechanism happened
    for (int s = 0; s < 12; s++)
      chk(visits[s] > 0, $sformatf("state T%0d visited %0d times", s, visits[s]));
    chk(n_wait_seen > 0, "waiting for a control bit");
    chk(n_int_changed > 0, $sformatf("pixels with a changed integration time: %0d", n_int_changed));
    chk(n_par > 0 && n_ser > 0 && n_fls > 0, "row transfers, serial shifts and flushes");
    chk(n_ack_queue > 0, $sformatf("acknowledges sent back to back: %0d", n_ack_queue));
    $display("mechanisms: par=%0d ser=%0d flush=%0d dcs=%0d acks=%0d ackq=%0d wait=%0d",
             n_par, n_ser, n_fls, n_dcs, n_ack, n_ack_queue, n_wait_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
