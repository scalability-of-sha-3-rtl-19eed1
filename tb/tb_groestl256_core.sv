// tb_groestl256_core: self-checking testbench of groestl256_core (Groestl-256).
//
// Hashes 7 test messages of lengths 0, 3, 55, 56, 64, 100, 200 bytes, padded here as a host
// would, and offers them block by block with random idle gaps and random
// back-pressure on the digest.  Expected digests come from an independent
// software model of the algorithm (the empty-message values are the
// published known answers).  Besides the digest, each block's processing
// time is checked: 11 cycles after the clock edge that accepts a block the
// core is ready again, plus 11 cycles of finalisation after the last block.
module tb_groestl256_core;
  import sha_if_pkg::*;
  import tb_hash_pkg::*;

  localparam int BB = 512;
  localparam int NCASE = 7;
  localparam int P_CYC = 11;
  localparam int F_CYC = 11;
  localparam int LEN  [NCASE] = '{0, 3, 55, 56, 64, 100, 200};
  localparam int SEED [NCASE] = '{0, 1, 2, 3, 4, 5, 6};
  localparam logic [7:0] DSB [NCASE] = '{8'h01, 8'h01, 8'h01, 8'h01, 8'h01, 8'h01, 8'h01};
  localparam digest_t EXP [NCASE] = '{
    256'h1a52d11d550039be16107f9c58db9ebcc417f16f736adb2502567119f0083467,
    256'hc611e8f0ed24e780ab9f806ec060a1e7506a9724399bd4f849351a915237d310,
    256'hc08db1a24050639605512c82d49400e39fb35af7dc8c3ccdfafe534c29262bee,
    256'h388367e938c68cef0bc8a876d202b7215c33f6a06308092eaeba2f2e24086e01,
    256'h6caae85e7f3b6dd6ac50da7b979171bfa68ae90cd3e02cb992e4bac967a63a5c,
    256'h9f218f820c6bbef89187314a2ba6f9b550fcbaf113b5e2f5f7c7ecd978ee4e28,
    256'ha525953982f7418fca3dda4b97a7d4f890d744a46b64f3bbe1d9d8813e3481e2};

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

  groestl256_core dut (.*);

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
    p = pad_groestl(len,seed);
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
