// tb_keccak_core: self-checking testbench of keccak_core (Keccak-256 and SHA3-256).
//
// Hashes 6 test messages of lengths 0, 3, 135, 136, 300, 300 bytes, padded here as a host
// would, and offers them block by block with random idle gaps and random
// back-pressure on the digest.  Expected digests come from an independent
// software model of the algorithm (the empty-message values are the
// published known answers).  Besides the digest, each block's processing
// time is checked: 1800 cycles after the clock edge that accepts a block the
// core is ready again.
module tb_keccak_core;
  import sha_if_pkg::*;
  import tb_hash_pkg::*;

  localparam int BB = 1088;
  localparam int NCASE = 6;
  localparam int P_CYC = 1800;
  localparam int F_CYC = 0;
  localparam int LEN  [NCASE] = '{0, 3, 135, 136, 300, 300};
  localparam int SEED [NCASE] = '{0, 1, 2, 3, 4, 9};
  localparam logic [7:0] DSB [NCASE] = '{8'h01, 8'h01, 8'h01, 8'h01, 8'h01, 8'h06};
  localparam digest_t EXP [NCASE] = '{
    256'hc5d2460186f7233c927e7db2dcc703c0e500b653ca82273b7bfad8045d85a470,
    256'hae260203c15609b85bd5322e5750625232bb9c50b1197dbe0a132b164bd18e6f,
    256'h4fb76b6faa63c595fda424d9dcfe969f54c1bcde6c76aec3a7ca86145a90d6a3,
    256'h689c5e40e5a32bcea17593f61a8b3a94bc3dbfa30249b39629d64a49da49b258,
    256'hed241d43e01063b9de9fc35a47ddafbc5d655f86b4bf319a404df5383e23bd0d,
    256'h68ed6f606110f9a53c53c41da5694048822dd3e8a10528b404e7a83f9759ea8d};

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

  keccak_core dut (.*);

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
    p = pad_keccak(len,seed,ds);
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
