// data_ram: working memory of the memory-based FFT, N words of one complex
// sample each (2 x DATA_W = 32 bits), built from registers.
//
// The RAM receives a frame of input samples, holds the outputs of each
// butterfly stage so they can be fed back into the butterflies for the next
// stage, and finally delivers the result. Its ports follow those uses:
//   load port     ld_en/ld_addr/ld_data, one sample per clock
//   stage ports   N combinational read ports (two per butterfly) and N write
//                 ports written together when wr_en is high; the control unit
//                 supplies a permutation of the addresses, so they never
//                 collide (in-place computation)
//   output port   synchronous read: out_rd_en/out_addr, out_data valid the
//                 next clock
// Loading and stage writes never happen in the same clock (asserted).
// Organisation as registers with parallel ports is this design's choice;
// the design only fixes the size (8 words for 8 points, 64 for 64 points).
module data_ram
  import fft_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // load port
  input  logic          ld_en,
  input  logic [AW-1:0] ld_addr,
  input  cplx_t         ld_data,
  // stage ports
  input  logic [AW-1:0] rd_addr [N],
  output cplx_t         rd_data [N],
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr [N],
  input  cplx_t         wr_data [N],
  // output port
  input  logic          out_rd_en,
  input  logic [AW-1:0] out_addr,
  output cplx_t         out_data
);

  cplx_t mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) mem[i] <= '0;
    end else if (wr_en) begin
      for (int p = 0; p < N; p++) mem[wr_addr[p]] <= wr_data[p];
    end else if (ld_en) begin
      mem[ld_addr] <= ld_data;
    end
  end

  always_comb begin
    for (int p = 0; p < N; p++) rd_data[p] = mem[rd_addr[p]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         out_data <= '0;
    else if (out_rd_en) out_data <= mem[out_addr];
  end

  // a clock never both loads and writes back
  always_ff @(posedge clk) begin
    if (rst_n) a_no_load_during_write: assert (!(wr_en && ld_en));
  end

endmodule
