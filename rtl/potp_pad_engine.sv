// potp_pad_engine: the encryption unit that turns seeds into pads.
//
// It computes pad = AES-128_KEY(seed), one seed accepted per cycle (fully
// pipelined), and returns each pad exactly CRYPTO_LAT cycles after its seed
// together with the tag that came with it. Stage 0 registers seed ^ round
// key 0, stages 1..10 each perform one AES round, and a delay line of
// CRYPTO_LAT-11 registers brings the total latency to CRYPTO_LAT, the
// crypto delay the document assumes (50 cycles; 102 in its sensitivity
// study). The same unit serves reads and writes, because a POTP pad is
// used for both directions.
//
// Interface: seed_valid/seed/seed_tag in; pad_valid/pad/pad_tag out. There
// is no back-pressure. The round keys are expanded combinationally from
// `key`, which must stay stable while seeds are in flight (the program key
// is fixed for a run). The key schedule and round structure are those of
// FIPS-197; the pipelining and the latency padding are this design's own.
module potp_pad_engine
  import potp_pkg::*;
#(
  parameter int unsigned CRYPTO_LAT = 50,
  parameter int unsigned TAG_W      = $bits(pad_tag_t)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [127:0]     key,
  input  logic             seed_valid,
  input  logic [127:0]     seed,
  input  logic [TAG_W-1:0] seed_tag,
  output logic             pad_valid,
  output logic [127:0]     pad,
  output logic [TAG_W-1:0] pad_tag
);

  localparam int unsigned NR  = 10;
  localparam int unsigned DLY = CRYPTO_LAT - NR - 1;
  localparam sbox_t SBOX = sbox_table();

  initial assert (CRYPTO_LAT >= NR + 1)
    else $error("CRYPTO_LAT must be at least %0d", NR + 1);

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  function automatic logic [127:0] sub_bytes(input logic [127:0] s);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[i*8 +: 8] = SBOX[s[i*8 +: 8]];
    return r;
  endfunction

  // Byte n of the state (n = row + 4*column) sits at bits [127-8n -: 8].
  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(row + 4*c) -: 8] = s[127 - 8*(row + 4*((c + row) % 4)) -: 8];
    return r;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    logic [127:0] r;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = s[127 - 32*c -: 8];
      a1 = s[119 - 32*c -: 8];
      a2 = s[111 - 32*c -: 8];
      a3 = s[103 - 32*c -: 8];
      r[127 - 32*c -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      r[119 - 32*c -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      r[111 - 32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      r[103 - 32*c -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  // ------------------------------------------------------ key schedule
  logic [127:0] rk [NR+1];

  always_comb begin
    logic [31:0] w [44];
    logic [7:0]  rcon;
    rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      if (i % 4 == 0) begin
        w[i] = w[i-4] ^ sub_word({w[i-1][23:0], w[i-1][31:24]}) ^ {rcon, 24'h0};
        rcon = xtime(rcon);
      end else begin
        w[i] = w[i-4] ^ w[i-1];
      end
    end
    for (int r = 0; r <= NR; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  end

  // ------------------------------------------------------ round pipeline
  logic [127:0]     st  [NR+1];
  logic [TAG_W-1:0] tg  [NR+1];
  logic [NR:0]      vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      for (int r = 0; r <= NR; r++) begin
        st[r] <= '0;
        tg[r] <= '0;
      end
    end else begin
      vld   <= {vld[NR-1:0], seed_valid};
      st[0] <= seed ^ rk[0];
      tg[0] <= seed_tag;
      for (int r = 1; r <= NR; r++) begin
        if (r == NR) st[r] <= shift_rows(sub_bytes(st[r-1])) ^ rk[r];
        else         st[r] <= mix_columns(shift_rows(sub_bytes(st[r-1]))) ^ rk[r];
        tg[r] <= tg[r-1];
      end
    end
  end

  // ------------------------------------------------------ latency padding
  if (DLY == 0) begin : g_nodly
    assign pad_valid = vld[NR];
    assign pad       = st[NR];
    assign pad_tag   = tg[NR];
  end else begin : g_dly
    logic [127:0]     dpad [DLY];
    logic [TAG_W-1:0] dtag [DLY];
    logic [DLY-1:0]   dvld;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dvld <= '0;
        for (int i = 0; i < DLY; i++) begin
          dpad[i] <= '0;
          dtag[i] <= '0;
        end
      end else begin
        dvld[0] <= vld[NR];
        dpad[0] <= st[NR];
        dtag[0] <= tg[NR];
        for (int i = 1; i < DLY; i++) begin
          dvld[i] <= dvld[i-1];
          dpad[i] <= dpad[i-1];
          dtag[i] <= dtag[i-1];
        end
      end
    end
    assign pad_valid = dvld[DLY-1];
    assign pad       = dpad[DLY-1];
    assign pad_tag   = dtag[DLY-1];
  end

endmodule
