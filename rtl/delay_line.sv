// delay_line: fixed delay of D clock cycles for a W-bit word.
//
// A circular buffer of D words with one pointer: each cycle the word stored D
// cycles ago is read out (combinational read) and the new word is written in
// its place. D = 0 is a plain wire. The line shifts every clock; there is no
// enable, because the FFT streams one pair per clock without gaps inside a
// frame. The buffer is cleared by reset so that nothing read is undefined.
module delay_line #(
  parameter int W = 8,
  parameter int D = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (D == 0) begin : g_wire
    assign dout = din;
  end else if (D == 1) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst) dout <= '0;
      else     dout <= din;
    end
  end else begin : g_ring
    localparam int AW = $clog2(D);
    logic [W-1:0]  mem [D];
    logic [AW-1:0] ptr;
    assign dout = mem[ptr];
    always_ff @(posedge clk) begin
      if (rst) begin
        ptr <= '0;
        for (int i = 0; i < D; i++) mem[i] <= '0;
      end else begin
        mem[ptr] <= din;
        ptr      <= (ptr == AW'(D - 1)) ? '0 : ptr + 1'b1;
      end
    end
  end
endmodule
