// tb_potp_pad_engine: checks the pipelined AES pad engine against the
// FIPS-197 C.1 vector and against the reference model for random seeds
// issued back to back, and checks that every pad appears exactly
// CRYPTO_LAT cycles after its seed with its tag intact.
module tb_potp_pad_engine;
  import potp_pkg::*;
  import aes_ref_pkg::*;

  localparam int unsigned LAT = 50;
  localparam int unsigned N   = 64;

  logic clk = 0, rst_n = 0;
  logic [127:0] key;
  logic seed_valid;
  logic [127:0] seed;
  logic [$bits(pad_tag_t)-1:0] seed_tag, pad_tag;
  logic pad_valid;
  logic [127:0] pad;
  int checks = 0, failures = 0;
  int cycle = 0;

  logic [127:0] exp_pad [N];
  int           issue_cyc [N];
  int           got = 0;

  potp_pad_engine #(.CRYPTO_LAT(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model self-check.
  initial begin
    checks++;
    if (aes128(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++;
      $display("reference AES fails FIPS-197 C.1");
    end
  end

  always @(posedge clk) begin
    if (pad_valid) begin
      int i;
      i = int'(pad_tag);
      checks++;
      if (pad !== exp_pad[i]) begin
        failures++;
        $display("pad %0d mismatch: %h vs %h", i, pad, exp_pad[i]);
      end
      checks++;
      if (cycle - issue_cyc[i] != LAT) begin
        failures++;
        $display("pad %0d latency %0d, expected %0d", i, cycle - issue_cyc[i], LAT);
      end
      got++;
    end
  end

  initial begin
    key = 128'h000102030405060708090a0b0c0d0e0f;
    seed_valid = 0; seed = '0; seed_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      if (i == 20) begin          // a gap in the stream
        @(negedge clk);
        seed_valid = 0;
        @(negedge clk);
      end
      @(negedge clk);
      seed_valid = 1;
      seed = (i == 0) ? 128'h00112233445566778899aabbccddeeff
                      : {$urandom, $urandom, $urandom, $urandom};
      seed_tag = 7'(i);
      exp_pad[i] = aes128(key, seed);
      issue_cyc[i] = cycle;       // value seen at the capturing edge
    end
    @(negedge clk);
    seed_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (got != N) begin
      failures++;
      $display("received %0d pads of %0d", got, N);
    end
    checks++;
    if (exp_pad[0] !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
