// tb_cmd_rx: self-checking testbench of the serial command receiver.
//
// Sends random 24-bit words MSB first with a host serial clock of random
// half periods (2..6 controller cycles) and random gaps, and checks that each
// word comes out once, unchanged, with `valid` within four controller cycles
// of the last rising clock edge. It also breaks off a word half way, waits
// for the framing timeout and checks that the next whole word is still
// received correctly and that no stray word appeared.
module tb_cmd_rx;
  import ccd_pkg::*;

  localparam int TIMEOUT = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sclk = 1'b0;
  logic sdi = 1'b0;
  logic [23:0] word;
  logic valid;
  int checks = 0, failures = 0;
  int nvalid = 0;
  logic [23:0] last_word;
  longint cyc = 0, valid_cyc = 0;

  always #5 clk = ~clk;
  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (valid) begin
      nvalid++;
      last_word = word;
      valid_cyc = cyc;
    end
  end

  cmd_rx #(.FRAME_TIMEOUT(TIMEOUT)) dut (.clk, .rst_n, .sclk, .sdi, .word, .valid);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // shift out nbits of w, MSB first; returns the cycle of the last rising edge
  task automatic send_bits(logic [23:0] w, int nbits, output longint last_rise);
    for (int i = 23; i > 23 - nbits; i--) begin
      @(negedge clk);
      sdi  = w[i];
      sclk = 1'b0;
      repeat ($urandom_range(2, 6)) @(negedge clk);
      sclk = 1'b1;
      last_rise = cyc;
      repeat ($urandom_range(1, 5)) @(negedge clk);
    end
  endtask

  initial begin
    longint lr;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      automatic logic [23:0] w = 24'($urandom);
      automatic int n0 = nvalid;
      send_bits(w, 24, lr);
      repeat (6) @(negedge clk);
      chk(nvalid == n0 + 1 && last_word == w,
          $sformatf("word %0d: sent %h got %h (%0d valid)", n, w, last_word, nvalid - n0));
      chk(valid_cyc - lr <= 4, $sformatf("word %0d latency %0d", n, valid_cyc - lr));
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    // broken-off frame, then timeout, then a full word
    for (int n = 0; n < 4; n++) begin
      automatic logic [23:0] w = 24'($urandom);
      automatic int n0 = nvalid;
      send_bits(24'($urandom), $urandom_range(1, 23), lr);
      repeat (TIMEOUT + 10) @(negedge clk);
      chk(nvalid == n0, "no word from a broken-off frame");
      send_bits(w, 24, lr);
      repeat (6) @(negedge clk);
      chk(nvalid == n0 + 1 && last_word == w,
          $sformatf("word after timeout: sent %h got %h", w, last_word));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
