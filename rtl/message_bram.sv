// message_bram: navigation-message block RAM of one SV.
//
// DEPTH words of WIDTH bits (1023 x 32 by default, 32,736 bits) with one
// write port for the host, which loads the message, and one read port for the
// serialiser. Both ports are synchronous; a read returns the word one cycle
// after the address is presented. A read of a word written in the same cycle
// returns the old contents. The contents are not initialised: the host must
// write every word that is sent.
module message_bram #(
  parameter int DEPTH  = 1023,
  parameter int WIDTH  = 32,
  parameter int ADDR_W = 10
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH)
      mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (int'(raddr) < DEPTH) rdata <= mem[raddr];
    else                     rdata <= '0;
  end

  initial assert (DEPTH <= 2 ** ADDR_W) else $error("message_bram: DEPTH exceeds address range");

endmodule
