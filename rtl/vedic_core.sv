// vedic_core: unsigned W x W multiplier built the Vedic (Urdhva-Tiryakbhyam,
// "vertically and crosswise") way, with the partial products merged by a
// Wallace-style carry-save stage.
//
// Structure: a W-bit operand pair is split into halves (H = W/2). Four
// half-width products are formed by recursive instances of this module
// (low x low, low x high, high x low, high x high). The high-high and
// low-low products do not overlap and are concatenated into one row; the two
// cross products, shifted by H, give two more rows. The three rows are
// reduced to a sum and a carry row by one layer of 3:2 compressors (full
// adders, the Wallace tree step) and a single carry-propagate adder closes
// the result. The recursion ends in the 2x2 Vedic cell (four AND gates and
// two half adders). An odd width is padded with one zero MSB.
//
// Purely combinational: p = a * b, 2W bits. The combination of Vedic
// decomposition with Wallace reduction is what the design calls its
// "Vedic cum Wallace" multiplier; the exact split and the single CSA layer
// per level are this implementation's choice.
//
// Lint note: when this module is linted on its own as the top level, the
// lint run of Verilator reports the four sub-products (ll, lh, hl, hh) of
// the top instance as undriven. They are driven by the recursive instances below,
// and the products are exact in simulation (see tb_vedic_mult); the report
// concerns only the self-recursive top and is left standing.
module vedic_core #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  if (W == 1) begin : g_w1
    assign p = {1'b0, a[0] & b[0]};
  end else if (W == 2) begin : g_w2
    // 2x2 Vedic cell
    logic c1;
    assign p[0] = a[0] & b[0];
    assign p[1] = (a[1] & b[0]) ^ (a[0] & b[1]);
    assign c1   = (a[1] & b[0]) & (a[0] & b[1]);
    assign p[2] = (a[1] & b[1]) ^ c1;
    assign p[3] = (a[1] & b[1]) & c1;
  end else if ((W % 2) == 1) begin : g_pad
    logic [2*W+1:0] pw;
    vedic_core #(.W(W + 1)) u_pad (.a({1'b0, a}), .b({1'b0, b}), .p(pw));
    assign p = pw[2*W-1:0];
  end else begin : g_split
    localparam int unsigned H = W / 2;
    logic [W-1:0]   ll, lh, hl, hh;
    logic [2*W-1:0] row0, row1, row2, sum_row, carry_row;

    vedic_core #(.W(H)) u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(ll));
    vedic_core #(.W(H)) u_lh (.a(a[H-1:0]), .b(b[W-1:H]), .p(lh));
    vedic_core #(.W(H)) u_hl (.a(a[W-1:H]), .b(b[H-1:0]), .p(hl));
    vedic_core #(.W(H)) u_hh (.a(a[W-1:H]), .b(b[W-1:H]), .p(hh));

    always_comb begin
      row0      = {hh, ll};
      row1      = {{H{1'b0}}, lh, {H{1'b0}}};
      row2      = {{H{1'b0}}, hl, {H{1'b0}}};
      // one layer of 3:2 compressors
      sum_row   = row0 ^ row1 ^ row2;
      carry_row = ((row0 & row1) | (row0 & row2) | (row1 & row2)) << 1;
      p         = sum_row + carry_row;
    end
  end

endmodule
