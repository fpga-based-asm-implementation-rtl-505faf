// tb_asm_ctrl: self-checking testbench of the algorithmic state machine.
//
// The controller runs alone: the testbench answers waveform requests after a
// random delay, models the ADC (a conversion returns the next value of a
// counter after a random delay) and takes pixels with a randomly stalling
// ready. Commands are written straight onto `cmd_valid`/`cmd_word`.
// Checked against values worked out here:
//   - the trace of state codes, against the state assignment
//     (T0=0000 ... T11=1011) and the transition table, including waiting in
//     a state while its control bit is absent;
//   - the DAC word, the static outputs, the number of row-clear and flush
//     waveforms;
//   - for random readout parameters, the exact list of waveform requests
//     (prescan rows with clears, PBIN row shifts per binned row, PRESHIFT
//     shifts, per pixel reference / SBIN shifts / signal, POSTSHIFT shifts),
//     the number of conversions and the pixel values and their order;
//   - the number of acknowledges.
module tb_asm_ctrl;
  import ccd_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic cmd_valid = 1'b0;
  logic [23:0] cmd_word = '0;
  logic ack;
  logic wg_start;
  seq_t wg_seq;
  logic wg_done = 1'b0;
  logic adc_start;
  logic adc_done = 1'b0;
  logic [15:0] adc_data = '0;
  logic pix_valid;
  logic [15:0] pix_data;
  logic pix_ready = 1'b0;
  logic dac_load;
  logic [15:0] dac_data, gpo;
  logic [7:0] int_time;
  asm_state_t state;
  logic [23:0] a1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  asm_ctrl dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- models ----------------
  seq_t wg_log [$];
  int   wg_busy_cnt = 0, wg_overlap = 0;
  always @(negedge clk) begin
    wg_done <= 1'b0;
    if (wg_busy_cnt > 0) begin
      wg_busy_cnt--;
      if (wg_busy_cnt == 0) wg_done <= 1'b1;
    end
    if (wg_start) begin
      if (wg_busy_cnt != 0) wg_overlap++;
      wg_log.push_back(wg_seq);
      wg_busy_cnt = $urandom_range(1, 4);
    end
  end

  int adc_cnt = 0, adc_busy_cnt = 0, nconv = 0;
  logic [15:0] adc_val = 16'h1234;
  always @(negedge clk) begin
    adc_done <= 1'b0;
    if (adc_busy_cnt > 0) begin
      adc_busy_cnt--;
      if (adc_busy_cnt == 0) begin
        adc_done <= 1'b1;
        adc_data <= adc_val;
      end
    end
    if (adc_start) begin
      nconv++;
      adc_val = adc_val + 16'h0101;
      adc_busy_cnt = $urandom_range(1, 5);
    end
  end

  logic [15:0] pix_log [$];
  always @(negedge clk) begin
    pix_ready = ($urandom_range(0, 2) != 0);
    if (pix_valid && pix_ready) pix_log.push_back(pix_data);
  end

  int nack = 0, ndac = 0;
  logic [15:0] last_dac;
  always @(negedge clk) begin
    if (ack) nack++;
    if (dac_load) begin
      ndac++;
      last_dac = dac_data;
    end
  end

  logic [3:0] st_log [$];
  logic [3:0] st_prev = 4'hF;
  always @(negedge clk) begin
    if (4'(state) != st_prev) st_log.push_back(4'(state));
    st_prev <= 4'(state);
  end

  // ---------------- stimulus helpers ----------------
  task automatic cmd(logic [23:0] w);
    @(negedge clk);
    cmd_word  = w;
    cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  function automatic logic [23:0] bitw(int b, logic [15:0] payload);
    return (24'd1 << b) | {8'd0, payload};
  endfunction

  task automatic wait_quiet(int maxc);
    // wait until no waveform, conversion or pixel is in flight for 20 cycles
    int q = 0;
    int c = 0;
    while (q < 20 && c < maxc) begin
      @(negedge clk);
      c++;
      if (wg_busy_cnt == 0 && adc_busy_cnt == 0 && !pix_valid && !wg_start) q++;
      else q = 0;
    end
  endtask

  task automatic expect_trace(logic [3:0] exp[$], string what);
    bit ok = (exp.size() == st_log.size());
    for (int i = 0; ok && i < exp.size(); i++) ok = (exp[i] == st_log[i]);
    chk(ok, $sformatf("%s: state trace %p expected %p", what, st_log, exp));
    st_log.delete();
  endtask

  task automatic expect_wg(seq_t exp[$], string what);
    bit ok = (exp.size() == wg_log.size());
    for (int i = 0; ok && i < exp.size(); i++) ok = (exp[i] == wg_log[i]);
    chk(ok, $sformatf("%s: %0d waveform requests, expected %0d", what, wg_log.size(), exp.size()));
    wg_log.delete();
  endtask

  // one frame with random parameters, starting in GETPAR
  task automatic frame(int nr, int pb, int sb, int np, int pre, int psh, int post, int it);
    seq_t exp_wg[$];
    logic [3:0] exp_st[$];
    logic [15:0] exp_pix[$];
    logic [15:0] v;
    int n0_ack = nack;
    int n0_conv = nconv;
    v = adc_val;
    cmd({5'd0, 3'(P_NROWS),    16'(nr)});
    cmd({5'd0, 3'(P_PBIN),     16'(pb)});
    cmd({5'd0, 3'(P_SBIN),     16'(sb)});
    cmd({5'd0, 3'(P_NPIX),     16'(np)});
    cmd({5'd0, 3'(P_PRESCAN),  16'(pre)});
    cmd({5'd0, 3'(P_PRESHIFT), 16'(psh)});
    cmd({5'd0, 3'(P_POSTSHIFT),16'(post)});
    chk(int_time == 8'd250, "integration time after BOOTSTRAP is the default");
    cmd({5'd0, 3'(P_INTTIME),  16'(it)});
    chk(int_time == ((it == 0) ? 8'd250 : 8'(it)), $sformatf("integration time %0d after writing %0d", int_time, it));
    chk(state == T6_GETPAR, "parameter words keep GETPAR");
    st_log.delete();
    cmd(bitw(22, 0));
    wait_quiet(200000);
    // expected waveforms and states
    exp_st.push_back(4'b0111);
    if (nr > 0) for (int i = 0; i < pre; i++) begin
      exp_wg.push_back(SEQ_PARALLEL);
      exp_wg.push_back(SEQ_DUMP);
    end
    for (int r = 0; r < nr; r++) begin
      for (int i = 0; i < pb; i++) exp_wg.push_back(SEQ_PARALLEL);
      for (int i = 0; i < psh; i++) exp_wg.push_back(SEQ_SERIAL);
      for (int p = 0; p < np; p++) begin
        exp_wg.push_back(SEQ_REF);
        for (int i = 0; i < sb; i++) exp_wg.push_back(SEQ_SERIAL);
        exp_wg.push_back(SEQ_SIG);
        v = v + 16'h0101;
        exp_pix.push_back(v);
      end
      for (int i = 0; i < post; i++) exp_wg.push_back(SEQ_SERIAL);
      exp_st.push_back(4'b1000);
      exp_st.push_back(4'b1001);
      exp_st.push_back(4'b1010);
      exp_st.push_back(4'b0111);
    end
    expect_wg(exp_wg, $sformatf("frame %0dx%0d bin %0dx%0d pre %0d/%0d post %0d",
                                nr, np, pb, sb, pre, psh, post));
    expect_trace(exp_st, "frame");
    chk(nconv - n0_conv == nr * np, $sformatf("%0d conversions, expected %0d", nconv - n0_conv, nr * np));
    begin
      bit ok = (pix_log.size() == exp_pix.size());
      for (int i = 0; ok && i < exp_pix.size(); i++) ok = (pix_log[i] == exp_pix[i]);
      chk(ok, $sformatf("%0d pixels out, expected %0d, values in order", pix_log.size(), exp_pix.size()));
      pix_log.delete();
    end
    chk(nack - n0_ack == 8 + 1, $sformatf("frame acks %0d", nack - n0_ack));
    chk(state == T7_READROW, "waits in READROW after the frame");
  endtask

  // ---------------- test ----------------
  initial begin
    logic [3:0] exp_st[$];
    seq_t exp_wg[$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    chk(state == T0_IDLE && 4'(state) == 4'b0000, "IDLE after reset");
    cmd(bitw(16, 0));
    chk(state == T0_IDLE, "IDLE waits for start");

    for (int run = 0; run < 2; run++) begin
      automatic int nclr = $urandom_range(0, 5);
      automatic int nfls = $urandom_range(1, 3);
      automatic logic [15:0] dacw = 16'($urandom);
      automatic logic [15:0] gpow = 16'($urandom);
      automatic int n0_ack = nack;
      st_log.delete();
      wg_log.delete();
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      repeat (3) @(negedge clk);
      chk(state == T1_BOOTSTRAP && a1 == '0, "BOOTSTRAP after start drops the command sent while idle");
      cmd(bitw(17, 0));
      chk(state == T1_BOOTSTRAP, $sformatf("BOOTSTRAP waits for A1[16] (%s a1=%h)", state.name(), a1));
      cmd(bitw(16, dacw));
      chk(state == T2_LOADDAC && ndac == run + 1 && last_dac == dacw, "LOADDAC loads the DAC word");
      cmd(bitw(18, 0));
      chk(state == T2_LOADDAC, "LOADDAC waits for A1[17]");
      cmd(bitw(17, gpow));
      chk(state == T3_OUTDATA && gpo == gpow, "OUTDATA sets the static outputs");
      cmd(bitw(18, 16'(nclr)));
      wait_quiet(10000);
      chk(state == T4_CLRROWS, "CLRROWS");
      for (int i = 0; i < nclr; i++) exp_wg.push_back(SEQ_PARALLEL);
      expect_wg(exp_wg, "row clear");
      exp_wg.delete();
      cmd(bitw(19, 0));
      chk(state == T4_CLRROWS, "CLRROWS waits for A1[21]");
      cmd(bitw(21, 16'(nfls)));
      wait_quiet(10000);
      chk(state == T5_PREFLUSH, "PREFLUSH");
      for (int i = 0; i < nfls; i++) exp_wg.push_back(SEQ_FLUSH);
      expect_wg(exp_wg, "pre-flush");
      exp_wg.delete();
      cmd(bitw(22, 0));
      chk(state == T5_PREFLUSH, "PREFLUSH waits for A1[19]");
      cmd(bitw(19, 0));
      chk(state == T6_GETPAR, "GETPAR");
      exp_st = '{4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0110};
      expect_trace(exp_st, "command chain");
      chk(nack - n0_ack == 5, $sformatf("acks for LOADDAC..GETPAR: %0d", nack - n0_ack));
      frame($urandom_range(1, 3), $urandom_range(1, 3), $urandom_range(1, 3),
            $urandom_range(1, 4), $urandom_range(0, 2), $urandom_range(0, 3),
            $urandom_range(0, 3), $urandom_range(0, 255));
      // without A1[20] the controller stays; with it, RESET then IDLE
      cmd(bitw(19, 0));
      chk(state == T7_READROW, "READROW waits for A1[20]");
      n0_ack = nack;
      cmd(bitw(20, 0));
      exp_st = '{4'b1011, 4'b0000};
      expect_trace(exp_st, "reset");
      chk(state == T0_IDLE && nack - n0_ack == 1 && a1 == '0 && int_time == 8'd250,
          "RESET returns to IDLE, clears A1 and restores the integration time");
    end

    // one word carrying several control bits, then a frame with no rows
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cmd(bitw(16, 0) | bitw(17, 0) | bitw(18, 0) | bitw(21, 0) | bitw(19, 0));
    wait_quiet(1000);
    chk(state == T6_GETPAR, "one word with several control bits steps through the chain");
    frame(0, 2, 2, 2, 1, 1, 1, 0);
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
