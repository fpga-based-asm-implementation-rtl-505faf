// tb_wavegen: self-checking testbench of the timing generator.
//
// Plays every sequence once, in a random order and with random idle gaps,
// and compares `sbits` cycle by cycle with a hand-written list of
// (time, state bits) words, checks the one-cycle `done` pulse at the end and
// the total length (sum of times + 1 cycle from start to done), and checks
// that the DCS reference (SBIT11 low, SBIT12 low) and signal (SBIT11 high,
// SBIT12 low) integrations last equally long, `int_time` cycles each, at the
// default 250 and at random integration times.
module tb_wavegen;
  import ccd_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  seq_t seq = SEQ_PARALLEL;
  logic [7:0] int_time = 8'd250;
  logic [15:0] sbits;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wavegen dut (.clk, .rst_n, .start, .seq, .int_time, .sbits, .busy, .done);

  // expected words: {time, bits}, zero-terminated
  function automatic int nwords(seq_t s);
    case (s)
      SEQ_PARALLEL, SEQ_SERIAL: return 6;
      SEQ_FLUSH, SEQ_REF:       return 4;
      SEQ_SIG:                  return 3;
      default:                  return 2;
    endcase
  endfunction

  function automatic logic [23:0] exp_word(seq_t s, int i, logic [7:0] it);
    logic [23:0] par [6] = '{{8'd8, 16'h1003}, {8'd8, 16'h1002}, {8'd8, 16'h100E},
                             {8'd8, 16'h100C}, {8'd8, 16'h1005}, {8'd8, 16'h1001}};
    logic [23:0] ser [6] = '{{8'd2, 16'h10B0}, {8'd2, 16'h10A0}, {8'd2, 16'h10E0},
                             {8'd2, 16'h10C0}, {8'd2, 16'h1050}, {8'd2, 16'h1010}};
    logic [23:0] fls [4] = '{{8'd16, 16'h11FF}, {8'd16, 16'h1122},
                             {8'd16, 16'h11FF}, {8'd16, 16'h1122}};
    logic [23:0] rf  [4] = '{{8'd2, 16'h1300}, {8'd2, 16'h1200},
                             {it, 16'h0000}, {8'd1, 16'h1000}};
    logic [23:0] sg  [3] = '{{8'd2, 16'h1000}, {it, 16'h0800}, {8'd1, 16'h1800}};
    logic [23:0] dmp [2] = '{{8'd16, 16'h11F0}, {8'd16, 16'h1100}};
    case (s)
      SEQ_PARALLEL: return par[i];
      SEQ_SERIAL:   return ser[i];
      SEQ_FLUSH:    return fls[i];
      SEQ_REF:      return rf[i];
      SEQ_SIG:      return sg[i];
      default:      return dmp[i];
    endcase
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int ref_int, sig_int;

  task automatic play(seq_t s);
    int total = 0;
    int bad = 0;
    @(negedge clk);
    seq   = s;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int w = 0; w < nwords(s); w++) begin
      logic [23:0] e = exp_word(s, w, int_time);
      for (int t = 0; t < int'(e[23:16]); t++) begin
        if (sbits !== e[15:0] || !busy || done) bad++;
        if (!sbits[SB_INTN] && !sbits[SB_POL]) ref_int++;
        if (!sbits[SB_INTN] &&  sbits[SB_POL]) sig_int++;
        total++;
        @(negedge clk);
      end
    end
    chk(bad == 0, $sformatf("sequence %s words (%0d bad cycles)", s.name(), bad));
    chk(done && !busy && sbits == SBITS_IDLE,
        $sformatf("sequence %s ends after %0d cycles with done", s.name(), total));
    @(negedge clk);
    chk(!done && !busy, $sformatf("sequence %s done is one cycle", s.name()));
  endtask

  initial begin
    static seq_t order [6] = '{SEQ_REF, SEQ_PARALLEL, SEQ_SIG, SEQ_FLUSH, SEQ_SERIAL, SEQ_DUMP};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    chk(sbits == SBITS_IDLE && !busy, "idle after reset");
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 6; i++) begin
        automatic int j = $urandom_range(0, 5);
        automatic seq_t tmp = order[i];
        order[i] = order[j];
        order[j] = tmp;
      end
      for (int i = 0; i < 6; i++) begin
        ref_int = 0;
        sig_int = 0;
        play(order[i]);
        repeat ($urandom_range(0, 4)) begin
          chk(sbits == SBITS_IDLE && !busy && !done, "idle between sequences");
          @(negedge clk);
        end
      end
      // DCS: equal positive and negative integration, at the default and at
      // a random integration time
      for (int k = 0; k < 2; k++) begin
        int_time = (k == 0) ? 8'd250 : 8'($urandom_range(1, 255));
        ref_int = 0; sig_int = 0;
        play(SEQ_REF);
        play(SEQ_SIG);
        chk(ref_int == int'(int_time) && sig_int == int'(int_time),
            $sformatf("DCS integration %0d: ref=%0d sig=%0d cycles", int_time, ref_int, sig_int));
      end
      int_time = 8'd250;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
