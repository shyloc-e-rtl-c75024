// weight_storage: weight FIFO of the CCSDS-123 predictor with the custom
// initialisation path.
//
// One weight vector per band, NZ_MAX entries, used as a circular FIFO of run-time
// length Nz: in band-interleaved-by-pixel order the vector of band z is read at the
// head, updated, and written back, to come out again Nz samples later at the next
// pixel. A multiplexer, steered by `load`, writes either the updated vector from
// the predictor or a custom initial vector from the configuration port. During
// configuration the custom vectors are loaded in band order 0..Nz-1; `restart`
// returns the pointer to band 0 before loading and before compressing. The
// vectors are not reset between images, so the weights of the previous image can
// serve as the custom initialisation of the next.
module weight_storage #(
  parameter int unsigned VW     = 96,   // bits of one weight vector
  parameter int unsigned NZ_MAX = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        restart,
  input  logic [$clog2(NZ_MAX+1)-1:0] nz,
  input  logic                        load,       // write a custom vector
  input  logic [VW-1:0]               load_vec,
  input  logic                        adv,        // write back an updated vector
  input  logic [VW-1:0]               upd_vec,
  output logic [VW-1:0]               rd_vec      // vector of the current band
);

  localparam int unsigned AW = (NZ_MAX > 1) ? $clog2(NZ_MAX) : 1;

  typedef enum logic { SRC_UPDATE, SRC_CUSTOM } src_e;

  logic [VW-1:0] mem [NZ_MAX];
  logic [AW-1:0] p_q;
  src_e          src;
  logic [VW-1:0] wdata;
  logic          we;

  assign src    = load ? SRC_CUSTOM : SRC_UPDATE;
  assign wdata  = (src == SRC_CUSTOM) ? load_vec : upd_vec;
  assign we     = load || adv;
  assign rd_vec = mem[p_q];

  always_ff @(posedge clk) begin
    if (we) mem[p_q] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       p_q <= '0;
    else if (restart) p_q <= '0;
    else if (we)      p_q <= (($clog2(NZ_MAX+1))'(p_q) + 1'b1 >= nz) ? '0 : p_q + 1'b1;
  end

endmodule
