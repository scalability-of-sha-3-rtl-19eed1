// tb_skein512_core: self-checking testbench of skein512_core (Skein-512-256).
//
// Hashes 6 test messages of lengths 0, 3, 64, 65, 100, 200 bytes, padded here as a host
// would, and offers them block by block with random idle gaps and random
// back-pressure on the digest.  Expected digests come from an independent
// software model of the algorithm (the empty-message values are the
// published known answers).  Besides the digest, each block's processing
// time is checked: 75 cycles after the clock edge that accepts a block the
// core is ready again, plus 75 cycles of finalisation after the last block.
module tb_skein512_core;
  import sha_if_pkg::*;
  import tb_hash_pkg::*;

  localparam int BB = 512;
  localparam int NCASE = 6;
  localparam int P_CYC = 75;
  localparam int F_CYC = 75;
  localparam int LEN  [NCASE] = '{0, 3, 64, 65, 100, 200};
  localparam int SEED [NCASE] = '{0, 1, 2, 3, 4, 5};
  localparam logic [7:0] DSB [NCASE] = '{8'h01, 8'h01, 8'h01, 8'h01, 8'h01, 8'h01};
  localparam digest_t EXP [NCASE] = '{
    256'h39ccc4554a8b31853b9de7a1fe638a24cce6b35a55f2431009e18780335d2621,
    256'h36b27b88a3b9e6e1f5c30e06370e6a6c7c85dee5fcc359d8cabefa654e48f00d,
    256'h15d6c94398b3fba2bfdeb4f27152c85472ac9ccb10f2d1e2c04e66cb2aa15467,
    256'hd8961fe0a347138bde585d6b4f6760416508702bd57a5abb508d011b578e0599,
    256'hab364192204bf4472860c45e1e1c27092a8fca8aad762bf94af5b9fbc8217f72,
    256'hdec7da31fa0a21033d01b782e277b586909b0872b33137ed05fc5f2b14e29527};

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic [BB-1:0] blk_data = '0;
  blk_info_t     blk_info = '0;
  logic          blk_valid = 1'b0;
  logic          blk_ready;
  digest_t       digest;
  logic          dig_valid;
  logic          dig_ready = 1'b0;
  int            checks = 0;
  int            failures = 0;
  longint        cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  skein512_core dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Inputs change, and outputs are sampled, 1 time unit after a rising edge.
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

  task automatic hash_one(input int c);
    bytes_t p;
    int nb, len, seed;
    logic [7:0] ds;
    longint t_acc, t_rdy;
    len = LEN[c]; seed = SEED[c]; ds = DSB[c];
    p = pad_skein(len,seed);
    nb = p.size() / (BB / 8);
    for (int b = 0; b < nb; b++) begin
      repeat ($urandom_range(0, 3)) tick();
      for (int k = 0; k < BB / 8; k++) blk_data[BB - 1 - 8*k -: 8] = p[b*(BB/8) + k];
      blk_info.first = (b == 0);
      blk_info.last  = (b == nb - 1);
      blk_info.empty = (longint'(b) * BB >= longint'(len) * 8);
      blk_info.bits  = ((longint'(b) + 1) * BB < longint'(len) * 8) ? (longint'(b) + 1) * BB : longint'(len) * 8;
      blk_valid = 1'b1;
      while (!blk_ready) tick();
      tick();
      t_acc = cyc;
      blk_valid = 1'b0;
      if (b != nb - 1) begin
        do tick(); while (!blk_ready);
        t_rdy = cyc;
        check(t_rdy - t_acc == P_CYC, $sformatf("case %0d block %0d took %0d cycles", c, b, t_rdy - t_acc));
      end
    end
    do tick(); while (!dig_valid);
    t_rdy = cyc;
    check(t_rdy - t_acc == P_CYC + F_CYC, $sformatf("case %0d last block took %0d cycles", c, t_rdy - t_acc));
    repeat ($urandom_range(0, 3)) begin
      tick();
      check(dig_valid, "digest withdrawn before it was taken");
    end
    check(digest == EXP[c], $sformatf("case %0d (%0d bytes): digest %h, expected %h", c, len, digest, EXP[c]));
    dig_ready = 1'b1;
    tick();
    dig_ready = 1'b0;
    check(!dig_valid, "digest still offered after it was taken");
  endtask

  initial begin
    repeat (3) tick();
    rst = 1'b0;
    for (int c = 0; c < NCASE; c++) hash_one(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
