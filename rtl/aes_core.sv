`timescale 1ns/1ps
// aes_core: AES-128/192/256 encryption and decryption engine.
//
// Iterative, one full round per clock, which gives the platform's AES-128
// rate of 128 bits every 10 clocks (2.56 Gbps at 200 MHz). Encryption and
// decryption share one round datapath: the first round takes the input
// block XORed with the first round key, so a block needs Nr clocks (10, 12
// or 14). The S-box is computed, not stored: multiplicative inverse in
// GF(2^8) (x^254) followed by the affine map; the inverse S-box applies the
// inverse affine map first.
// Key setup: key_load expands the key into all Nr+1 round keys, one 32-bit
// word per clock (up to 52 clocks for AES-256), and raises key_ready; a key
// is used for any number of blocks after that. Keeping all round keys lets
// decryption start from the last one at full speed.
// Interface: key is left-aligned (a 128-bit key is key[255:128]); key_len
// 0/1/2 = 128/192/256 bits; start is a one-cycle pulse accepted when not
// busy and key_ready; done pulses for one clock with dout valid. Byte 0 of
// a block is bits [127:120] (FIPS-197 order).
// The key sizes, the single encrypt/decrypt control and the throughput are
// the platform's; the architecture is this design's.
module aes_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [255:0] key,
  input  logic [1:0]   key_len,
  input  logic         key_load,
  output logic         key_ready,
  input  logic         start,
  input  logic         decrypt,
  input  logic [127:0] din,
  output logic [127:0] dout,
  output logic         busy,
  output logic         done
);
  // ---------------- GF(2^8) helpers
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction
  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = '0, x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction
  function automatic logic [7:0] ginv(input logic [7:0] a);   // a^254
    logic [7:0] r = 8'h01, sq = a;
    for (int i = 1; i < 8; i++) begin
      sq = gmul(sq, sq);          // a^(2^i)
      r  = gmul(r, sq);           // product of a^2 .. a^128 = a^254
    end
    return r;
  endfunction
  function automatic logic [7:0] rotl8(input logic [7:0] a, input int n);
    return (a << n) | (a >> (8 - n));
  endfunction
  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction
  function automatic logic [7:0] inv_sbox(input logic [7:0] a);
    return ginv(rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05);
  endfunction

  // ---------------- round transformations (state byte i = s[127-8i -: 8])
  function automatic logic [7:0] byte_of(input logic [127:0] s, input int i);
    return s[127 - 8*i -: 8];
  endfunction
  function automatic logic [127:0] sub_shift(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = sbox(byte_of(s, 4*((c + r) % 4) + r));
    return o;
  endfunction
  function automatic logic [127:0] inv_shift_sub(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = inv_sbox(byte_of(s, 4*((c + 4 - r) % 4) + r));
    return o;
  endfunction
  function automatic logic [127:0] mix(input logic [127:0] s);
    logic [127:0] o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = byte_of(s, 4*c); a1 = byte_of(s, 4*c+1); a2 = byte_of(s, 4*c+2); a3 = byte_of(s, 4*c+3);
      o[127 - 32*c -: 32] = {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
                             a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
                             a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
                             xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
    end
    return o;
  endfunction
  function automatic logic [127:0] inv_mix(input logic [127:0] s);
    logic [127:0] o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = byte_of(s, 4*c); a1 = byte_of(s, 4*c+1); a2 = byte_of(s, 4*c+2); a3 = byte_of(s, 4*c+3);
      o[127 - 32*c -: 32] = {gmul(a0,8'h0e) ^ gmul(a1,8'h0b) ^ gmul(a2,8'h0d) ^ gmul(a3,8'h09),
                             gmul(a0,8'h09) ^ gmul(a1,8'h0e) ^ gmul(a2,8'h0b) ^ gmul(a3,8'h0d),
                             gmul(a0,8'h0d) ^ gmul(a1,8'h09) ^ gmul(a2,8'h0e) ^ gmul(a3,8'h0b),
                             gmul(a0,8'h0b) ^ gmul(a1,8'h0d) ^ gmul(a2,8'h09) ^ gmul(a3,8'h0e)};
    end
    return o;
  endfunction
  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  // ---------------- key expansion
  logic [31:0] w [60];
  logic [5:0]  ki;        // next word index
  logic [2:0]  kj;        // ki mod Nk
  logic [7:0]  rcon;
  logic        expanding;
  logic [3:0]  nk_q, nr_q;
  logic [31:0] temp;

  always_comb begin
    temp = w[ki - 6'd1];
    if (kj == '0)                      temp = sub_word({temp[23:0], temp[31:24]}) ^ {rcon, 24'd0};
    else if (nk_q == 4'd8 && kj == 3'd4) temp = sub_word(temp);
  end

  // ---------------- round datapath
  logic [127:0] st, x, y;
  logic [3:0]   rnd;     // round being computed, 1..Nr
  logic         dec_q;
  logic [3:0]   kidx;

  function automatic logic [127:0] rk(input logic [3:0] n);
    return {w[4*n], w[4*n+1], w[4*n+2], w[4*n+3]};
  endfunction

  always_comb begin
    logic dec, last;
    logic [3:0] r;
    dec  = busy ? dec_q : decrypt;
    r    = busy ? rnd : 4'd1;
    last = (r == nr_q);
    x    = busy ? st : (din ^ rk(decrypt ? nr_q : 4'd0));
    kidx = dec ? (nr_q - r) : r;
    if (!dec) begin
      y = sub_shift(x);
      if (!last) y = mix(y);
      y = y ^ rk(kidx);
    end else begin
      y = inv_shift_sub(x) ^ rk(kidx);
      if (!last) y = inv_mix(y);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ki <= '0; kj <= '0; rcon <= 8'h01; expanding <= 1'b0; key_ready <= 1'b0;
      nk_q <= 4'd4; nr_q <= 4'd10;
      st <= '0; rnd <= '0; dec_q <= 1'b0; busy <= 1'b0; done <= 1'b0; dout <= '0;
    end else begin
      done <= 1'b0;
      if (key_load && !busy) begin
        for (int i = 0; i < 8; i++) w[i] <= key[255 - 32*i -: 32];
        unique case (key_len)
          2'd1:    begin nk_q <= 4'd6; nr_q <= 4'd12; ki <= 6'd6; end
          2'd2:    begin nk_q <= 4'd8; nr_q <= 4'd14; ki <= 6'd8; end
          default: begin nk_q <= 4'd4; nr_q <= 4'd10; ki <= 6'd4; end
        endcase
        kj        <= '0;
        rcon      <= 8'h01;
        expanding <= 1'b1;
        key_ready <= 1'b0;
      end else if (expanding) begin
        w[ki] <= w[ki - 6'(nk_q)] ^ temp;
        if (kj == '0) rcon <= xtime(rcon);
        kj <= (kj == 3'(nk_q - 1)) ? '0 : kj + 1'b1;
        if (ki == 6'(4*nr_q + 3)) begin
          expanding <= 1'b0;
          key_ready <= 1'b1;
        end
        ki <= ki + 1'b1;
      end
      if (!busy) begin
        if (start && key_ready && !expanding) begin
          st    <= y;
          dec_q <= decrypt;
          if (nr_q == 4'd1) begin
            done <= 1'b1;
            dout <= y;
          end else begin
            rnd  <= 4'd2;
            busy <= 1'b1;
          end
        end
      end else begin
        st <= y;
        if (rnd == nr_q) begin
          busy <= 1'b0;
          done <= 1'b1;
          dout <= y;
        end else rnd <= rnd + 1'b1;
      end
    end
  end
endmodule
