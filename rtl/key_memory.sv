// key_memory -- storage for the expanded key: NR+1 round keys of 128 bits.
//
// For AES-128 (NR = 10) this is 11 x 128 bits, the 44 words of the expanded
// key. The key schedule fills it once per cipher key; after that every
// block, in either direction, reads its round keys from here, so a new key
// costs the expansion only once and decryption can take the keys in reverse
// order. One synchronous write port, one asynchronous read port (a small
// distributed RAM). Addresses above NR are never used by the controller.
//
// A key memory under the controller's management is part of the published
// description; its 11 x 128-bit organisation and asynchronous read are
// choices of this implementation.
module key_memory
  import aes_pkg::*;
#(
  parameter int unsigned NR_P = aes_pkg::NR,
  localparam int unsigned AW  = $clog2(NR_P + 1)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  aes_block_t    wdata,
  input  logic [AW-1:0] raddr,
  output aes_block_t    rdata
);
  aes_block_t mem [NR_P + 1];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
