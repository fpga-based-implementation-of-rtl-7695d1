// aes_round_key_ram: storage for the expanded round keys.
//
// DEPTH words of WIDTH bits (15 x 128 for AES-256), one synchronous write
// port and one asynchronous read port, the shape of an FPGA distributed RAM.
// The key schedule writes it once per cipher key; the cipher then reads the
// round key of the current round by address each cycle. Keeping the expanded
// keys in RAM, so that each round simply addresses its own key, follows the
// round-key memory idea; the single 15-word memory and the asynchronous read
// are this design's choice. The memory has no reset, like a RAM: a word is
// meaningful only once the key schedule has written it.
module aes_round_key_ram #(
  parameter int unsigned DEPTH = 15,
  parameter int unsigned WIDTH = 128,
  parameter int unsigned AW    = 4
) (
  input  logic             clk,
  input  logic             we_i,
  input  logic [AW-1:0]    waddr_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic [AW-1:0]    raddr_i,
  output logic [WIDTH-1:0] rdata_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i && (int'(waddr_i) < int'(DEPTH))) begin
      mem[waddr_i] <= wdata_i;
    end
  end

  assign rdata_o = (int'(raddr_i) < int'(DEPTH)) ? mem[raddr_i] : '0;

  a_waddr_in_range: assert property (@(posedge clk) 
    we_i |-> int'(waddr_i) < int'(DEPTH));

endmodule
