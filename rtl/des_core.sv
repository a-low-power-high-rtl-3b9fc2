`timescale 1ns/1ps
// des_core: DES and triple-DES engine, 64-bit block.
//
// Iterative: one Feistel round per clock. A start loads the block through
// the initial permutation and the pass key through permuted choice 1; each
// following clock runs one round, rotating the key halves left (encryption)
// or right (decryption) so that each round key is made on the fly and
// encryption and decryption share the datapath; only the rotation direction
// and the order of passes differ. After 16 rounds the halves are swapped and
// put through the final permutation. In triple-DES mode three passes run
// back to back, E(K1) D(K2) E(K3) to encrypt and D(K3) E(K2) D(K1) to
// decrypt; 128-bit keys are used as K1 K2 K1 and 64-bit keys as K1 K1 K1
// (keying is chosen by the caller through the key input).
// Interface: key = {K1, K2, K3} (parity bits ignored); start is a one-cycle
// pulse accepted when not busy; done pulses with dout valid.
// Timing: 1 + 16 clocks per DES block, 1 + 48 per triple-DES block.
// The algorithm tables are those of the DES standard (FIPS 46-3). The
// platform gives the block and key sizes and the single encrypt/decrypt
// control bit; the round-per-clock architecture is this design's.
module des_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [191:0] key,
  input  logic         triple,
  input  logic         decrypt,
  input  logic         start,
  input  logic [63:0]  din,
  output logic [63:0]  dout,
  output logic         busy,
  output logic         done
);
  typedef byte unsigned tab64_t [64];
  localparam tab64_t IP_T = '{58,50,42,34,26,18,10,2,60,52,44,36,28,20,12,4,
    62,54,46,38,30,22,14,6,64,56,48,40,32,24,16,8,57,49,41,33,25,17,9,1,
    59,51,43,35,27,19,11,3,61,53,45,37,29,21,13,5,63,55,47,39,31,23,15,7};
  localparam tab64_t FP_T = '{40,8,48,16,56,24,64,32,39,7,47,15,55,23,63,31,
    38,6,46,14,54,22,62,30,37,5,45,13,53,21,61,29,36,4,44,12,52,20,60,28,
    35,3,43,11,51,19,59,27,34,2,42,10,50,18,58,26,33,1,41,9,49,17,57,25};
  localparam byte unsigned E_T [48] = '{32,1,2,3,4,5,4,5,6,7,8,9,8,9,10,11,
    12,13,12,13,14,15,16,17,16,17,18,19,20,21,20,21,22,23,24,25,24,25,26,27,
    28,29,28,29,30,31,32,1};
  localparam byte unsigned P_T [32] = '{16,7,20,21,29,12,28,17,1,15,23,26,5,
    18,31,10,2,8,24,14,32,27,3,9,19,13,30,6,22,11,4,25};
  localparam byte unsigned PC1_T [56] = '{57,49,41,33,25,17,9,1,58,50,42,34,
    26,18,10,2,59,51,43,35,27,19,11,3,60,52,44,36,63,55,47,39,31,23,15,7,62,
    54,46,38,30,22,14,6,61,53,45,37,29,21,13,5,28,20,12,4};
  localparam byte unsigned PC2_T [48] = '{14,17,11,24,1,5,3,28,15,6,21,10,23,
    19,12,4,26,8,16,7,27,20,13,2,41,52,31,37,47,55,30,40,51,45,33,48,44,49,
    39,56,34,53,46,42,50,36,29,32};
  // Left-rotation amount before round 1..16 (index 0 unused).
  localparam byte unsigned SH_T [17] = '{0,1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1};
  // S-boxes: entry (row*16 + col) is the 4-bit field at [255-4*entry -: 4].
  localparam logic [255:0] SBOX [8] = '{
    256'he4d12fb83a6c59070f74e2d1a6cb953841e8d62bfc973a50fc8249175b3ea06d,
    256'hf18e6b34972dc05a3d47f28ec01a69b50e7ba4d158c6932fd8a13f42b67c05e9,
    256'ha09e63f51dc7b428d709346a285ecbf1d6498f30b12c5ae71ad069874fe3b52c,
    256'h7de3069a1285bc4fd8b56f03472c1ae9a690cb7df13e52843f06a1d8945bc72e,
    256'h2c417ab6853fd0e9eb2c47d150fa3986421bad78f9c5630eb8c71e2d6f09a453,
    256'hc1af92680d34e75baf427c9561de0b389ef528c3704a1db6432c95fabe17608d,
    256'h4b2ef08d3c975a61d0b7491ae35c2f8614bdc37eaf6805926bd814a7950fe23c,
    256'hd2846fb1a93e50c71fd8a374c56b0e927b419ce206adf35821e74a8dfc90356b};

  // Bit n of the standard's 1-based numbering is bit (W - n) here.
  function automatic logic [63:0] perm_ip(input logic [63:0] x);
    for (int i = 0; i < 64; i++) perm_ip[63 - i] = x[64 - IP_T[i]];
  endfunction
  function automatic logic [63:0] perm_fp(input logic [63:0] x);
    for (int i = 0; i < 64; i++) perm_fp[63 - i] = x[64 - FP_T[i]];
  endfunction
  function automatic logic [55:0] pc1(input logic [63:0] k);
    for (int i = 0; i < 56; i++) pc1[55 - i] = k[64 - PC1_T[i]];
  endfunction
  function automatic logic [47:0] pc2(input logic [55:0] cd);
    for (int i = 0; i < 48; i++) pc2[47 - i] = cd[56 - PC2_T[i]];
  endfunction
  function automatic logic [31:0] feistel(input logic [31:0] r, input logic [47:0] k);
    logic [47:0] e;
    logic [31:0] s;
    logic [5:0]  six;
    for (int i = 0; i < 48; i++) e[47 - i] = r[32 - E_T[i]];
    e = e ^ k;
    for (int i = 0; i < 8; i++) begin
      six = e[47 - 6*i -: 6];
      s[31 - 4*i -: 4] = SBOX[i][255 - 4*{six[5], six[0], six[4:1]} -: 4];
    end
    for (int i = 0; i < 32; i++) feistel[31 - i] = s[32 - P_T[i]];
  endfunction
  function automatic logic [27:0] rotl(input logic [27:0] x, input logic [7:0] n);
    return (n == 8'd2) ? {x[25:0], x[27:26]} : {x[26:0], x[27]};
  endfunction
  function automatic logic [27:0] rotr(input logic [27:0] x, input logic [7:0] n);
    return (n == 8'd2) ? {x[1:0], x[27:2]} : {x[0], x[27:1]};
  endfunction

  logic [31:0] l, r;
  logic [55:0] cd, cd_use;
  logic [4:0]  rnd;      // round 1..16 being computed
  logic [1:0]  pass;
  logic        mode_tri, mode_dec;
  logic        pass_dec;
  logic [63:0] next_key;
  logic [63:0] pre_out;

  // Key and direction of each pass.
  function automatic logic [63:0] key_of(input logic [1:0] p, input logic dec, input logic tri_);
    if (!tri_)      return key[191:128];
    if (p == 2'd1)  return key[127:64];
    if (p == 2'd0)  return dec ? key[63:0]    : key[191:128];
    return                 dec ? key[191:128] : key[63:0];
  endfunction

  assign pass_dec = mode_dec ^ (pass == 2'd1);
  assign next_key = key_of(pass + 2'd1, mode_dec, mode_tri);

  always_comb begin
    if (!pass_dec)      cd_use = {rotl(cd[55:28], SH_T[rnd]), rotl(cd[27:0], SH_T[rnd])};
    else if (rnd == 1)  cd_use = cd;
    else                cd_use = {rotr(cd[55:28], SH_T[18 - rnd]), rotr(cd[27:0], SH_T[18 - rnd])};
  end

  // After round 16 the halves are swapped: {R16, L16}.
  assign pre_out = {l ^ feistel(r, pc2(cd_use)), r};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l <= '0; r <= '0; cd <= '0; rnd <= '0; pass <= '0;
      mode_tri <= 1'b0; mode_dec <= 1'b0; busy <= 1'b0; done <= 1'b0; dout <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          {l, r}   <= perm_ip(din);
          cd       <= pc1(triple ? (decrypt ? key[63:0] : key[191:128]) : key[191:128]);
          mode_tri <= triple;
          mode_dec <= decrypt;
          pass     <= '0;
          rnd      <= 5'd1;
          busy     <= 1'b1;
        end
      end else begin
        l  <= r;
        r  <= l ^ feistel(r, pc2(cd_use));
        cd <= cd_use;
        if (rnd != 5'd16) begin
          rnd <= rnd + 1'b1;
        end else if (!mode_tri || pass == 2'd2) begin
          busy <= 1'b0;
          done <= 1'b1;
          dout <= perm_fp(pre_out);
        end else begin
          // next pass: FP followed by IP cancel, only the swap remains
          {l, r} <= pre_out;
          cd     <= pc1(next_key);
          pass   <= pass + 1'b1;
          rnd    <= 5'd1;
        end
      end
    end
  end
endmodule
