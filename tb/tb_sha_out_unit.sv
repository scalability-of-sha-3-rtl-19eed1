// tb_sha_out_unit: self-checking testbench of sha_out_unit.
//
// Sends random digests, collects the 16-bit words written on dout and
// compares them, most significant word first, with the digest.  The first
// digest is sent with a destination that is always ready, and must leave in
// exactly 16 cycles; the following ones meet random back-pressure.
module tb_sha_out_unit;
  import sha_if_pkg::*;

  logic    clk = 1'b0;
  logic    rst = 1'b1;
  digest_t digest = '0;
  logic    dig_valid = 1'b0;
  logic    dig_ready;
  word_t   dout;
  logic    dst_ready = 1'b0;
  logic    dst_write;

  int     checks = 0;
  int     failures = 0;
  bit     random_dst = 1'b0;
  int     n_bp = 0;

  always #5 clk = ~clk;

  sha_out_unit dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) tick();
    rst = 1'b0;
    for (int n = 0; n < 30; n++) begin
      digest_t d, got;
      int words, cycles;
      for (int i = 0; i < 8; i++) d[32*i +: 32] = $urandom;
      random_dst = (n != 0);
      digest = d;
      dig_valid = 1'b1;
      while (!dig_ready) tick();
      tick();
      dig_valid = 1'b0;
      digest = '0;
      words = 0;
      cycles = 0;
      got = '0;
      while (words < 16) begin
        // choose the destination's readiness, then sample what the next
        // edge will transfer
        dst_ready = random_dst ? ($urandom_range(0, 2) != 0) : 1'b1;
        #2;
        if (dst_write) begin
          got = {got[DIGEST_BITS-W-1:0], dout};
          words++;
        end else begin
          n_bp++;
        end
        check(!(dst_write && !dst_ready), "write without room");
        tick();
        cycles++;
      end
      check(got == d, $sformatf("digest %0d: got %h expected %h", n, got, d));
      if (n == 0) check(cycles == 16, $sformatf("unstalled digest took %0d cycles", cycles));
      dst_ready = 1'b1;
      #2;
      check(!dst_write, "extra word written");
    end
    check(n_bp > 0, "no back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
