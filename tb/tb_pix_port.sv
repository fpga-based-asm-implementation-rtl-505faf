// tb_pix_port: self-checking testbench of the parallel image-data port.
//
// Offers random 16-bit pixels with random gaps. A host model latches `pd` on
// each rising edge of `pstb` and pairs the bytes high first. Checks: every
// pixel arrives once and unchanged, in order; `pd` is stable from one cycle
// before the strobe rises to one cycle after it falls; the strobe is STB_W
// cycles wide; a pixel occupies the port for 2*(STB_W+2) cycles.
module tb_pix_port;
  import ccd_pkg::*;

  localparam int STB_W = 3;
  localparam int NPIX  = 60;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [15:0] in_data = '0;
  logic in_ready;
  logic [7:0] pd;
  logic pstb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pix_port #(.STB_W(STB_W)) dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .pd, .pstb);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [15:0] sent [$];
  logic [15:0] got  [$];

  // host model and timing monitors
  logic pstb_d = 1'b0;
  logic [7:0] pd_d = '0;
  int stb_len = 0, bad_width = 0, bad_setup = 0, bad_hold = 0;
  int nbyte = 0;
  logic [7:0] hi;
  always @(negedge clk) begin
    pstb_d <= pstb;
    pd_d   <= pd;
    if (pstb && !pstb_d) begin
      if (pd != pd_d) bad_setup++;
      if (nbyte == 0) hi = pd;
      else got.push_back({hi, pd});
      nbyte = 1 - nbyte;
    end
    if (pstb) begin
      stb_len++;
      if (pstb_d && pd != pd_d) bad_setup++;
    end
    if (!pstb && pstb_d) begin
      if (stb_len != STB_W) bad_width++;
      if (pd != pd_d) bad_hold++;
      stb_len = 0;
    end
  end

  // busy time per pixel
  int busy_len = 0, bad_busy = 0;
  always @(negedge clk) begin
    if (!in_ready) busy_len++;
    else if (busy_len != 0) begin
      if (busy_len != 2 * (STB_W + 2)) bad_busy++;
      busy_len = 0;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(in_ready && !pstb, "idle after reset");
    for (int i = 0; i < NPIX; i++) begin
      in_data  = 16'($urandom);
      in_valid = 1'b1;
      while (!in_ready) @(negedge clk);
      sent.push_back(in_data);
      @(negedge clk);
      in_valid = 1'b0;
      in_data  = 16'($urandom);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    while (!in_ready) @(negedge clk);
    repeat (3) @(negedge clk);
    chk(got.size() == NPIX, $sformatf("%0d pixels received", got.size()));
    for (int i = 0; i < NPIX && i < got.size(); i++)
      chk(got[i] == sent[i], $sformatf("pixel %0d sent %h got %h", i, sent[i], got[i]));
    chk(bad_width == 0, $sformatf("%0d strobes not %0d cycles wide", bad_width, STB_W));
    chk(bad_setup == 0, $sformatf("%0d setup violations", bad_setup));
    chk(bad_hold == 0, $sformatf("%0d hold violations", bad_hold));
    chk(bad_busy == 0, $sformatf("%0d pixels not %0d cycles", bad_busy, 2 * (STB_W + 2)));
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
