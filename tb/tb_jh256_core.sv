// tb_jh256_core: self-checking testbench of jh256_core (JH-256).
//
// Hashes 6 test messages of lengths 0, 3, 63, 64, 100, 200 bytes, padded here as a host
// would, and offers them block by block with random idle gaps and random
// back-pressure on the digest.  Expected digests come from an independent
// software model of the algorithm (the empty-message values are the
// published known answers).  Besides the digest, each block's processing
// time is checked: 43 cycles after the clock edge that accepts a block the
// core is ready again.
module tb_jh256_core;
  import sha_if_pkg::*;
  import tb_hash_pkg::*;

  localparam int BB = 512;
  localparam int NCASE = 6;
  localparam int P_CYC = 43;
  localparam int F_CYC = 0;
  localparam int LEN  [NCASE] = '{0, 3, 63, 64, 100, 200};
  localparam int SEED [NCASE] = '{0, 1, 2, 3, 4, 5};
  localparam logic [7:0] DSB [NCASE] = '{8'h01, 8'h01, 8'h01, 8'h01, 8'h01, 8'h01};
  localparam digest_t EXP [NCASE] = '{
    256'h46e64619c18bb0a92a5e87185a47eef83ca747b8fcc8e1412921357e326df434,
    256'hae417ed072c9c88555c410e7bb5053c996815759e64023e11032c6dbdcd6a0c7,
    256'hca5d04c201a2aedff1e8d0464ac52b4f184f223e7b9b1a36f232d9d30cd7c6eb,
    256'h214d26cc6c7f96488a2e74321920c1add6c0fba54155baef5028e4be300323f4,
    256'h61b4276d1f342ded1959149276b74d10fe0e5a82cde6d380caaf98cebf5bf994,
    256'h62df7fcca9634b82f03a1f7166c084fd5743b0669459710f6818f9d6a799733a};

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

  jh256_core dut (.*);

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
    p = pad_jh(len,seed);
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
