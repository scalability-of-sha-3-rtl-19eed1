// tb_sha_in_unit: self-checking testbench of sha_in_unit (512-bit blocks).
//
// A source process sends messages as header and data words over the 16-bit
// port; a sink process takes the blocks with random delays and compares
// each block's data and attributes (first, last, empty, bit count) with the
// values the source recorded.  Messages: one segment of three blocks whose
// last block holds padding only; two segments (two blocks, then one);
// then twenty random messages with random source stalls.  With a source that
// never stalls, loading one block must take exactly 32 cycles.
module tb_sha_in_unit;
  import sha_if_pkg::*;

  localparam int BB    = 512;
  localparam int WORDS = BB / W;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  word_t         din = '0;
  logic          src_ready = 1'b0;
  logic          src_read;
  logic [BB-1:0] blk_data;
  blk_info_t     blk_info;
  logic          blk_valid;
  logic          blk_ready = 1'b0;

  int     checks = 0;
  int     failures = 0;
  longint cyc = 0;
  bit     stall_src = 1'b0;
  bit     done = 1'b0;
  int     n_multiseg = 0, n_empty = 0, n_stall = 0;

  typedef struct {
    logic [BB-1:0] data;
    blk_info_t     info;
  } exp_t;
  exp_t exp_q [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  sha_in_unit #(.BLOCK_BITS(BB)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  // Offer one word and wait until it is read.
  task automatic send(input word_t w);
    din = w;
    if (stall_src)
      while ($urandom_range(0, 2) == 0) begin
        src_ready = 1'b0;
        n_stall++;
        tick();
      end
    src_ready = 1'b1;
    @(posedge clk iff src_read);
    #1;
    src_ready = 1'b0;
  endtask

  // Send a message made of the given segments (lengths in blocks); bp_last is
  // the number of bits before padding of the last segment.
  task automatic send_message(input int segs [$], input longint bp_last);
    longint done_bits;
    bit first;
    done_bits = 0;
    first = 1'b1;
    for (int s = 0; s < segs.size(); s++) begin
      bit last_seg;
      logic [31:0] hdr;
      last_seg = (s == segs.size() - 1);
      hdr = {31'(segs[s] * WORDS / 2), last_seg};
      send(hdr[31:16]);
      send(hdr[15:0]);
      if (last_seg) begin
        send(bp_last[31:16]);
        send(bp_last[15:0]);
      end
      for (int b = 0; b < segs[s]; b++) begin
        exp_t e;
        longint off;
        off = longint'(b) * BB;
        for (int k = 0; k < WORDS; k++) e.data[BB-1-W*k -: W] = W'($urandom);
        e.info.first = first;
        e.info.last  = last_seg && (b == segs[s] - 1);
        e.info.empty = last_seg && (off >= bp_last);
        e.info.bits  = done_bits + (last_seg ? ((off + BB < bp_last) ? off + BB : bp_last) : off + BB);
        if (e.info.empty) n_empty++;
        first = 1'b0;
        exp_q.push_back(e);
        for (int k = 0; k < WORDS; k++) send(e.data[BB-1-W*k -: W]);
      end
      if (!last_seg) done_bits += longint'(segs[s]) * BB;
    end
    if (segs.size() > 1) n_multiseg++;
  endtask

  // Sink: take blocks with random delays and compare them.
  initial begin : sink
    forever begin
      tick();
      if (blk_valid) begin
        exp_t e;
        repeat ($urandom_range(0, 5)) begin
          tick();
          check(blk_valid, "block withdrawn before it was taken");
        end
        check(exp_q.size() > 0, "unexpected block");
        if (exp_q.size() > 0) begin
          e = exp_q.pop_front();
          check(blk_data == e.data, "block data");
          check(blk_info == e.info, $sformatf("block info %p, expected %p", blk_info, e.info));
        end
        blk_ready = 1'b1;
        tick();
        blk_ready = 1'b0;
      end
    end
  end

  initial begin
    longint t0;
    int segs [$];
    repeat (3) tick();
    rst = 1'b0;
    tick();

    // 1: one segment of three blocks, the third only padding; timed load
    segs = '{3};
    fork
      send_message(segs, 64'd1000);
      begin
        // header (2) and bp (2) words go first; time the first block's data
        while (!(src_read && dut.state == dut.S_DATA)) tick();
        t0 = cyc;
        while (!blk_valid) tick();
        check(cyc - t0 == WORDS, $sformatf("loading took %0d cycles, expected %0d", cyc - t0, WORDS));
      end
    join
    // 2: two segments
    segs = '{2, 1};
    send_message(segs, 64'd100);
    // 3: random messages with source stalls
    stall_src = 1'b1;
    for (int i = 0; i < 20; i++) begin
      int ns, bl;
      ns = $urandom_range(1, 3);
      segs = {};
      for (int s = 0; s < ns; s++) begin segs.push_back($urandom_range(1, 3)); end
      bl = segs[ns - 1];
      send_message(segs, longint'($urandom_range(0, bl * BB - 1)));
    end
    while (exp_q.size() != 0) tick();
    repeat (10) tick();
    check(n_multiseg > 0, "no multi-segment message");
    check(n_empty > 0, "no padding-only block");
    check(n_stall > 0, "no source stall");
    $display("multi-segment messages %0d, padding-only blocks %0d, source stalls %0d",
             n_multiseg, n_empty, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
