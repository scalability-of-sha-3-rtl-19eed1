// tb_blake256_core: self-checking testbench of blake256_core (BLAKE-256).
//
// Hashes 8 test messages of lengths 0, 1, 3, 55, 56, 64, 100, 200 bytes, padded here as a host
// would, and offers them block by block with random idle gaps and random
// back-pressure on the digest.  Expected digests come from an independent
// software model of the algorithm (the empty-message values are the
// published known answers).  Besides the digest, each block's processing
// time is checked: 225 cycles after the clock edge that accepts a block the
// core is ready again.
module tb_blake256_core;
  import sha_if_pkg::*;
  import tb_hash_pkg::*;

  localparam int BB = 512;
  localparam int NCASE = 8;
  localparam int P_CYC = 225;
  localparam int F_CYC = 0;
  localparam int LEN  [NCASE] = '{0, 1, 3, 55, 56, 64, 100, 200};
  localparam int SEED [NCASE] = '{0, 1, 2, 3, 4, 5, 6, 7};
  localparam logic [7:0] DSB [NCASE] = '{8'h01, 8'h01, 8'h01, 8'h01, 8'h01, 8'h01, 8'h01, 8'h01};
  localparam digest_t EXP [NCASE] = '{
    256'h716f6e863f744b9ac22c97ec7b76ea5f5908bc5b2f67c61510bfc4751384ea7a,
    256'hcd8ab2f31500384abbe481c27bc05842a8ea12659b41882c32977fc4868787f8,
    256'h0483e58514e784d49758615aa11867fe4761d23deb080c2dae6613de037a9760,
    256'hdc2b47a515a91a36a1b4118c35a1f84b9f16d047949d98c1bf1df04d22e6e903,
    256'hf361c4ed68435d6549e709e0e26f6b4f7dcfeb85c9aa579caac7bd99641f7c18,
    256'hb9eba39795e1c502bb652ec95ea3d495ab92207f830ea9690a4bf8a948d7ae58,
    256'h8af792c95c145ab2dba6083c4c503e9deda2ad27399301909ebf2c1c9fe68365,
    256'hf7e5633bc5ea7cff42291d4bf32992c691bea3df192beb35bf4981b9ec80d0ae};

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

  blake256_core dut (.*);

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
    p = pad_blake(len,seed);
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
