// tb_ack_tx: self-checking testbench of the acknowledge transmitter.
//
// A host model samples `tx_sdo` on every rising edge of `tx_sclk` and
// assembles bytes MSB first. The test sends single acknowledges, bursts of
// back-to-back requests (queued while a byte is on the line) and finally more
// requests than the queue holds. It checks that every accepted request gives
// exactly one byte 8'hAA, that a byte takes 16*HALF cycles, that the clock
// rests high when idle, and that `overflow` rises only when the queue is full.
module tb_ack_tx;
  import ccd_pkg::*;

  localparam int HALF = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic send = 1'b0;
  logic tx_sclk, tx_sdo, busy, overflow;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ack_tx #(.HALF(HALF), .QW(3)) dut (.clk, .rst_n, .send, .tx_sclk, .tx_sdo, .busy, .overflow);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // host side
  int nbytes = 0, nbad = 0, nbits = 0;
  logic [7:0] sh;
  logic sclk_d = 1'b1;
  longint cyc = 0, first_rise = 0, byte_cycles = 0;
  always @(negedge clk) begin
    cyc <= cyc + 1;
    sclk_d <= tx_sclk;
    if (tx_sclk && !sclk_d) begin
      if (nbits == 0) first_rise = cyc;
      sh = {sh[6:0], tx_sdo};
      nbits++;
      if (nbits == 8) begin
        nbits = 0;
        nbytes++;
        byte_cycles = cyc - first_rise;
        if (sh != 8'hAA) nbad++;
      end
    end
  end

  task automatic pulse;
    @(negedge clk);
    send = 1'b1;
    @(negedge clk);
    send = 1'b0;
  endtask

  task automatic wait_idle;
    while (busy) @(negedge clk);
    repeat (2 * HALF + 2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(tx_sclk && !busy, "idle clock high after reset");
    // single bytes
    for (int i = 0; i < 3; i++) begin
      automatic int n0 = nbytes;
      pulse();
      wait_idle();
      chk(nbytes == n0 + 1, "one byte per request");
      chk(byte_cycles == 14 * HALF, $sformatf("7 bit periods between first and last rising edge: %0d", byte_cycles));
    end
    // bursts within the queue depth (1 on the line + 7 waiting)
    for (int b = 1; b <= 8; b++) begin
      automatic int n0 = nbytes;
      for (int i = 0; i < b; i++) begin
        pulse();
        repeat ($urandom_range(0, 10)) @(negedge clk);
      end
      wait_idle();
      chk(nbytes == n0 + b, $sformatf("burst of %0d gives %0d bytes", b, nbytes - n0));
      chk(!overflow, "no overflow within queue depth");
    end
    chk(nbad == 0, $sformatf("%0d bytes were not AA", nbad));
    // overflow: 1 on the line + 7 queued, the 9th is dropped
    begin
      automatic int n0 = nbytes;
      for (int i = 0; i < 9; i++) pulse();
      wait_idle();
      chk(overflow, "overflow flagged");
      chk(nbytes == n0 + 8, $sformatf("queue full: %0d bytes", nbytes - n0));
    end
    chk(tx_sclk, "clock rests high");
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
