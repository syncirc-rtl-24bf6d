// AES-128 encryption as a single combinational circuit.
//
// Ten rounds of SubBytes (16 aes_sbox instances per round), ShiftRows,
// MixColumns (omitted in the last round) and AddRoundKey, with the key
// schedule computed alongside (four S-boxes per round key). Only the S-boxes
// contain AND gates; all other steps are XORs and wiring. Byte order follows
// FIPS-197: pt[127:120] is state byte 0, bytes fill the 4x4 state column by
// column. The round structure is the AES standard; the design names AES
// encryption as an advanced function built from its S-box.
//
// Interface: key, pt (128 bits) in; ct (128 bits) out. Combinational.
module aes_encrypt (
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic [127:0] ct
);
  import syncirc_pkg::*;

  localparam logic [7:0] RCON [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                                       8'h20, 8'h40, 8'h80, 8'h1B, 8'h36};

  // State and round keys as byte arrays; byte 0 is the most significant
  // byte of the 128-bit word and bytes fill the state column by column.
  logic [7:0] rk0 [16];      // cipher key
  logic [7:0] st0 [16];      // state after the initial AddRoundKey

  for (genvar b = 0; b < 16; b++) begin : g_in
    assign rk0[b] = key[127 - 8*b -: 8];
    assign st0[b] = pt[127 - 8*b -: 8] ^ key[127 - 8*b -: 8];
    assign ct[127 - 8*b -: 8] = g_round[10].st[b];
  end

  // Each round holds its own round key rk and output state st.
  for (genvar n = 1; n <= 10; n++) begin : g_round
    logic [7:0] pk [16], ps [16];   // previous round key and state
    logic [7:0] rk [16], st [16];
    if (n == 1) begin : g_first
      assign pk = rk0;
      assign ps = st0;
    end else begin : g_next
      assign pk = g_round[n-1].rk;
      assign ps = g_round[n-1].st;
    end
    // Key schedule: first word gets SubWord(RotWord(last word)) ^ Rcon.
    logic [7:0] t [4];
    for (genvar b = 0; b < 4; b++) begin : g_ksbox
      aes_sbox u_sbox (.x(pk[12 + (b + 1) % 4]), .y(t[b]));
    end
    for (genvar b = 0; b < 4; b++) begin : g_w0
      if (b == 0) begin : g_rc
        assign rk[b] = pk[b] ^ t[b] ^ RCON[n-1];
      end else begin : g_norc
        assign rk[b] = pk[b] ^ t[b];
      end
    end
    for (genvar b = 4; b < 16; b++) begin : g_w
      assign rk[b] = pk[b] ^ rk[b-4];
    end

    // SubBytes, then ShiftRows: row r of column c comes from column c + r.
    logic [7:0] sb [16], sr [16];
    for (genvar b = 0; b < 16; b++) begin : g_sbox
      aes_sbox u_sbox (.x(ps[b]), .y(sb[b]));
      assign sr[b] = sb[4 * (((b / 4) + (b % 4)) % 4) + (b % 4)];
    end

    if (n < 10) begin : g_mix
      // MixColumns with the matrix (2 3 1 1 / 1 2 3 1 / 1 1 2 3 / 3 1 1 2).
      for (genvar c = 0; c < 4; c++) begin : g_col
        logic [7:0] a0, a1, a2, a3;
        assign a0 = sr[4*c];
        assign a1 = sr[4*c+1];
        assign a2 = sr[4*c+2];
        assign a3 = sr[4*c+3];
        assign st[4*c]   = gf_xtime(a0) ^ gf_xtime(a1) ^ a1 ^ a2 ^ a3 ^ rk[4*c];
        assign st[4*c+1] = a0 ^ gf_xtime(a1) ^ gf_xtime(a2) ^ a2 ^ a3 ^ rk[4*c+1];
        assign st[4*c+2] = a0 ^ a1 ^ gf_xtime(a2) ^ gf_xtime(a3) ^ a3 ^ rk[4*c+2];
        assign st[4*c+3] = gf_xtime(a0) ^ a0 ^ a1 ^ a2 ^ gf_xtime(a3) ^ rk[4*c+3];
      end
    end else begin : g_last
      for (genvar b = 0; b < 16; b++) begin : g_ark
        assign st[b] = sr[b] ^ rk[b];
      end
    end
  end
endmodule
