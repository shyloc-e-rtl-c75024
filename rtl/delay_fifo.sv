// delay_fifo: neighbour FIFO of the CCSDS-123 BIP predictor (FIFO left, FIFO top,
// FIFO top left). A circular buffer that delays a sample stream by `len` steps,
// len = Nz (number of bands), set at run time up to MAXLEN.
//
// On every `adv` the input is written at the pointer and the pointer moves on, so
// `dout` (read combinationally at the pointer) is the value written `len` steps
// earlier. In band-interleaved-by-pixel order a delay of Nz samples is one pixel:
// the left line turns the current sample into the west neighbour of the next
// pixel, and the top and top-left lines turn the top-right neighbour stream into
// the north and north-west ones. `clear` resets the pointer.
module delay_fifo #(
  parameter int unsigned W      = 16,
  parameter int unsigned MAXLEN = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic [$clog2(MAXLEN+1)-1:0] len,
  input  logic                        adv,
  input  logic [W-1:0]                din,
  output logic [W-1:0]                dout
);

  localparam int unsigned AW = (MAXLEN > 1) ? $clog2(MAXLEN) : 1;

  logic [W-1:0]  mem [MAXLEN];
  logic [AW-1:0] p_q;

  assign dout = mem[p_q];

  always_ff @(posedge clk) begin
    if (adv) mem[p_q] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      p_q <= '0;
    else if (clear)  p_q <= '0;
    else if (adv)    p_q <= ($clog2(MAXLEN+1))'(p_q) + 1'b1 >= len ? '0 : p_q + 1'b1;
  end

endmodule
