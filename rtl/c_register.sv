// c_register: the C-register that holds the control lines of the C-gates.
//
// Each of the W cells drives one control line, which may fan out to one or
// several C-gates. The register is loaded serially from outside through one
// extra pin (si, one bit per clock while shift_en is high) and its content
// is shifted out on so at the same time, so a tester can check the register
// itself by reading back what it shifted in. For self-test the register can
// also be loaded in parallel (load_en, load_data) from an on-chip source.
//
// Timing: all changes take effect at the rising clock edge. Bits enter at
// the top end (ctrl[W-1]) and leave at bit 0 (so = ctrl[0]); after W shifts
// the first bit shifted in is in ctrl[0]. Parallel load wins over shift.
// Asynchronous active-low reset clears every cell, which puts all C-gates in
// normal mode. Width, bit order, reset and the parallel-load priority are
// choices of this design; serial loading through one pin and observation of
// the content through an I/O pin are part of the test method.
module c_register #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         si,
  output logic         so,
  input  logic         load_en,
  input  logic [W-1:0] load_data,
  output logic [W-1:0] ctrl
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= '0;
    end else if (load_en) begin
      ctrl <= load_data;
    end else if (shift_en) begin
      ctrl <= W'({si, ctrl} >> 1);
    end
  end

  assign so = ctrl[0];

endmodule
