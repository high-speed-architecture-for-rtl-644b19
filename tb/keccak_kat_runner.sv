// keccak_kat_runner - test harness around one keccak_top instance.
//
// Holds a keccak_top of the given configuration and offers a task that
// streams one byte message into it (word by word, little-endian bytes) and
// returns the digest, zero-extended to 2048 bits, and the number of cycles
// from the first word to the digest. Used by tb_keccak_kat.
module keccak_kat_runner #(
  parameter int unsigned RATE     = 1024,
  parameter int unsigned OUT_W    = 512,
  parameter int unsigned DATA_W   = 64,
  parameter logic [7:0]  PAD_BYTE = 8'h01
) (
  input logic clk,
  input logic rst_n
);
  import keccak_ref_pkg::*;

  localparam int BPW = DATA_W / 8;

  logic                          in_valid = 0, in_ready, in_last = 0;
  logic [DATA_W-1:0]             in_data = '0;
  logic [$clog2(DATA_W/8+1)-1:0] in_bytes = '0;
  logic                          hash_valid, hash_ready = 0, busy;
  logic [OUT_W-1:0]              hash;

  keccak_top #(.RATE(RATE), .OUT_W(OUT_W), .DATA_W(DATA_W), .PAD_BYTE(PAD_BYTE)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last, .in_bytes,
    .hash_valid, .hash_ready, .hash, .busy);

  task automatic hash_msg(input bytes_t msg, output logic [2047:0] digest, output int cycles);
    int n  = msg.size();
    int nw = (n == 0) ? 1 : (n + BPW - 1) / BPW;
    cycles = 0;
    for (int w = 0; w < nw; w++) begin
      logic [DATA_W-1:0] word = '0;
      for (int b = 0; b < BPW; b++)
        if (w * BPW + b < n) word[8*b +: 8] = msg[w * BPW + b];
      @(negedge clk);
      in_valid = 1;
      in_data  = word;
      in_last  = (w == nw - 1);
      in_bytes = (w == nw - 1) ? ($bits(in_bytes))'(n - w * BPW) : ($bits(in_bytes))'(BPW);
      @(posedge clk);
      cycles++;
      while (!in_ready) begin @(posedge clk); cycles++; end
      @(negedge clk);
      in_valid = 0;
    end
    while (!hash_valid) begin @(negedge clk); cycles++; end
    digest = '0;
    digest[OUT_W-1:0] = hash;
    hash_ready = 1;
    @(negedge clk);
    hash_ready = 0;
  endtask

endmodule
