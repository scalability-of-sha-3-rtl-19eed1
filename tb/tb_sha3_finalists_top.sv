// tb_sha3_finalists_top: end-to-end testbench of sha3_finalists_top at its
// default (and only) configuration.
//
// All five hash units run at the same time, each fed by its own source
// process over the 16-bit interface and drained by its own sink process.
// Each unit hashes four messages (message bytes from tb_hash_pkg, padded
// here as a host would):
//   0: 3 bytes, one segment, no stalls; the cycles from the first word read
//      to the last digest word written are checked;
//   1: 200 bytes (300 for Keccak), sent as two segments, with stalls;
//   2: 64 bytes, with stalls (BLAKE: the second block holds padding only);
//   3: 130 bytes, two segments where the message has three blocks, stalls.
// Expected digests come from an independent software model.  The test also
// counts how often each mechanism of the design occurred and fails if one
// never did: multi-segment messages, multi-block messages, padding-only
// blocks, source stalls, destination stalls, a loaded block waiting for a
// busy core, and the finalisation steps of Groestl and Skein.
module tb_sha3_finalists_top;
  import sha_if_pkg::*;
  import tb_hash_pkg::*;

  localparam int NU = 5;
  localparam int NM = 4;
  localparam int LEN [NU][NM] = '{'{3, 200, 64, 130}, '{3, 200, 64, 130}, '{3, 200, 64, 130},
                                  '{3, 300, 64, 130}, '{3, 200, 64, 130}};
  localparam int SEED [NM] = '{11, 12, 13, 14};
  localparam int FSEG [NM] = '{0, 1, 0, 2};    // blocks in the first segment (0: one segment)
  localparam bit STALL [NM] = '{0, 1, 1, 1};
  localparam int BBITS [NU] = '{512, 512, 512, 1088, 512};
  // busy cycles of each core after accepting the last block, up to dig_valid
  localparam int PF [NU] = '{225, 22, 43, 1800, 150};
  // busy cycles of each core after accepting a block that is not the last
  localparam int PB [NU] = '{225, 11, 43, 1800, 75};
  localparam digest_t EXP [NU][NM] = '{
    '{256'h487bb75671af0a9af458690e33c8438a120da36f452874199005f59173ae03c8, 256'hc3cb32e4cad8d9c47067f7e3c0fb86d7b1fff282da1180b4e3866ce37ebf48b2, 256'hcf5b1c8337c93b5f9d2eb2deb7ff2bf77b7a28a88401782580a47e10493a751b, 256'h17f58fad80cce705059f0c36f347e2deb29c547d6cbe7cf8836c19b56896b538},
    '{256'he8cf245ded61b88f6051b80cfb92abccde73646d52138e8bc5a0c37b96a49498, 256'h7110c20e7a5a614ed3abbdbf9359f8a777302a0d445a7ed02884f8e5a5bf5102, 256'h1efb620e499e4794d1c158dff8bff9a301d1a1b543023434e931de0d614beabe, 256'h4c32ce327c9999e68d925147d29fb78254cbeaa04dc2086f491f518976a75d56},
    '{256'h71b1b9a2cc05410b459511a480dbf1bffa3d44bd7c705205dc232c4244527498, 256'h538457a104e35e0b19863e1fb93ad01e1a2a7e8dc2930dbeaa997737bc1fcdd4, 256'h6b647e8264d5a05fb54ac3bb31264230f1367fdc6f6af7ae45ed4702c16579d4, 256'hc427bb3290a8a15ceb54bcbd651628261bc831e506d88c639bf1d87a96889681},
    '{256'ha80cb77494958b60776c64160f90d3f83aa12d95d1ef9d54ee29b5d516727c08, 256'h504b3fb7440eb59b0132c1d425379855c3bf27b2133d76a5f54ecb1b2e2a2719, 256'hf325671271797a93c2e2494c4572ec3774538ced25ff2dcc8eaeb1b7d6940cbf, 256'hd660f8eff9eb3c406cf41c13b1ab7ee39f2713ce389261dbaf950d7218c785af},
    '{256'h7aa634d99e4c57ade35f375c13c04a8d7934c8bf78c3a9586d923f556d6b57b5, 256'h8e1cacf0971df41a2543b8df1060529c255818fb6cc1f5a9de76f783e3f22813, 256'h4d5f05ec70fc7af51b7bfad87c6eed333e5204a7de10f0c55ea04b4a0f506814, 256'h454ca0d504ebe108a8c9e3f57340c1f49f487b2f1c0be03a62e5082ed3076b56}};

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic [4:0][W-1:0] din = '0;
  logic [4:0]        src_ready = '0;
  logic [4:0]        src_read;
  logic [4:0][W-1:0] dout;
  logic [4:0]        dst_ready = '0;
  logic [4:0]        dst_write;

  int     checks = 0;
  int     failures = 0;
  longint cyc = 0;
  bit     stall [NU];
  longint t_first [NU];
  int     n_multiseg = 0, n_multiblk = 0, n_empty = 0, n_src_stall = 0, n_dst_stall = 0;
  int     n_core_busy = 0, n_groestl_out = 0, n_skein_out = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  sha3_finalists_top dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters, watched through the hierarchy
  always @(posedge clk) if (!rst) begin
    if (dut.g_unit[0].u_unit.blk_valid && !dut.g_unit[0].u_unit.blk_ready) n_core_busy++;
    if (dut.g_unit[1].u_unit.blk_valid && !dut.g_unit[1].u_unit.blk_ready) n_core_busy++;
    if (dut.g_unit[2].u_unit.blk_valid && !dut.g_unit[2].u_unit.blk_ready) n_core_busy++;
    if (dut.g_unit[3].u_unit.blk_valid && !dut.g_unit[3].u_unit.blk_ready) n_core_busy++;
    if (dut.g_unit[4].u_unit.blk_valid && !dut.g_unit[4].u_unit.blk_ready) n_core_busy++;
    // state encodings 4: S_OUTFIN of the Groestl core, S_FIN of the Skein core
    if (dut.g_unit[1].u_unit.g_core.u_core.fsm == 3'd4) n_groestl_out++;
    if (dut.g_unit[4].u_unit.g_core.u_core.fsm == 3'd4 &&
        dut.g_unit[4].u_unit.g_core.u_core.out_ph) n_skein_out++;
  end

  function automatic bytes_t padded(input int u, input int len, input int seed);
    case (u)
      0:       return pad_blake(len, seed);
      1:       return pad_groestl(len, seed);
      2:       return pad_jh(len, seed);
      3:       return pad_keccak(len, seed, 8'h01);
      default: return pad_skein(len, seed);
    endcase
  endfunction

  task automatic send(input int u, input word_t w);
    din[u] = w;
    if (stall[u])
      while ($urandom_range(0, 3) == 0) begin
        src_ready[u] = 1'b0;
        n_src_stall++;
        @(posedge clk);
        #1;
      end
    src_ready[u] = 1'b1;
    @(posedge clk iff src_read[u]);
    if (t_first[u] < 0) t_first[u] = cyc;
    #1;
    src_ready[u] = 1'b0;
  endtask

  task automatic send_seg(input int u, input bytes_t p, input int from_w, input int nw32,
                          input bit last, input longint bp);
    logic [31:0] hdr;
    hdr = {31'(nw32), last};
    send(u, hdr[31:16]);
    send(u, hdr[15:0]);
    if (last) begin
      send(u, bp[31:16]);
      send(u, bp[15:0]);
    end
    for (int k = 0; k < 2 * nw32; k++)
      send(u, {p[2*(from_w + k)], p[2*(from_w + k) + 1]});
  endtask

  task automatic source(input int u);
    for (int m = 0; m < NM; m++) begin
      bytes_t p;
      int nblk, bw, fs;
      p = padded(u, LEN[u][m], SEED[m]);
      bw = BBITS[u] / 16;                 // 16-bit words per block
      nblk = p.size() * 8 / BBITS[u];
      fs = (FSEG[m] < nblk) ? FSEG[m] : 0;
      if (nblk > 1) n_multiblk++;
      if (BBITS[u] * (nblk - 1) >= 8 * LEN[u][m] && u == 0) n_empty++;
      stall[u] = STALL[m];
      t_first[u] = -1;
      if (fs == 0) begin
        send_seg(u, p, 0, nblk * bw / 2, 1'b1, longint'(LEN[u][m]) * 8);
      end else begin
        n_multiseg++;
        send_seg(u, p, 0, fs * bw / 2, 1'b0, 0);
        send_seg(u, p, fs * bw, (nblk - fs) * bw / 2, 1'b1, longint'(LEN[u][m]) * 8 - longint'(fs) * BBITS[u]);
      end
      // wait until the sink has the digest before the next message
      wait (done_flag[u]);
      @(posedge clk);
      #1;
    end
  endtask

  bit done_flag [NU];

  task automatic sink(input int u);
    for (int m = 0; m < NM; m++) begin
      digest_t got;
      int words;
      words = 0;
      got = '0;
      done_flag[u] = 1'b0;
      while (words < 16) begin
        dst_ready[u] = STALL[m] ? ($urandom_range(0, 2) != 0) : 1'b1;
        if (!dst_ready[u]) n_dst_stall++;
        @(posedge clk iff 1'b1);
        if (dst_write[u]) begin
          got = {got[DIGEST_BITS-W-1:0], dout[u]};
          words++;
        end
        #1;
      end
      dst_ready[u] = 1'b0;
      check(got == EXP[u][m], $sformatf("unit %0d message %0d: digest %h, expected %h", u, m, got, EXP[u][m]));
      if (m == 0) begin
        // Counted inclusively: 4 header words, the first block's words, the
        // accept cycle; each further block is accepted max(busy, load) + 1
        // cycles after the previous one (loading overlaps processing); then
        // the busy cycles of the last block, the hand-over cycle, 16 words.
        longint expc;
        int wpb, nb;
        wpb = BBITS[u] / 16;
        nb = padded(u, LEN[u][m], SEED[m]).size() * 8 / BBITS[u];
        expc = 4 + wpb + 1 + (nb - 1) * (((PB[u] > wpb) ? PB[u] : wpb) + 1) + PF[u] + 1 + 16;
        check(cyc - t_first[u] == expc, $sformatf("unit %0d: %0d cycles from first word to last digest word, expected %0d",
                                                  u, cyc - t_first[u], expc));
      end
      done_flag[u] = 1'b1;
      @(posedge clk);
      #1;
    end
  endtask

  // one source and one sink process per unit
  bit start = 1'b0;
  int finished = 0;
  for (genvar g = 0; g < NU; g++) begin : g_drv
    initial begin
      wait (start);
      fork
        source(g);
        sink(g);
      join
      finished++;
    end
  end

  initial begin
    for (int u = 0; u < NU; u++) begin stall[u] = 1'b0; t_first[u] = -1; done_flag[u] = 1'b0; end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    start = 1'b1;
    wait (finished == NU);
    check(n_multiseg > 0, "no multi-segment message");
    check(n_multiblk > 0, "no multi-block message");
    check(n_empty > 0, "no padding-only block");
    check(n_src_stall > 0, "no source stall");
    check(n_dst_stall > 0, "no destination stall");
    check(n_core_busy > 0, "no block waited for a busy core");
    check(n_groestl_out > 0, "no Groestl output transformation");
    check(n_skein_out > 0, "no Skein output UBI");
    $display("multi-segment %0d, multi-block %0d, padding-only %0d, source stalls %0d, destination stalls %0d",
             n_multiseg, n_multiblk, n_empty, n_src_stall, n_dst_stall);
    $display("block waiting for core %0d cycles, Groestl output transforms %0d, Skein output UBIs %0d",
             n_core_busy, n_groestl_out, n_skein_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
