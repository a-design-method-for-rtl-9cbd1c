// sin_rom: sine look-up table.
//
// Returns round(AMP * sin(2*pi*addr / 2^AW)) as a DW-bit signed word. The
// table is computed when the design is elaborated, so it becomes a constant
// ROM (or plain logic) after synthesis; nothing is loaded from a file.
// A cosine is read from the same table by adding a quarter period,
// 2^(AW-2), to the address. Purely combinational.
//
// The 32-point, 8-bit, [-127,127] default is the carrier table of the NCO;
// rounding to nearest is this design's choice.
module sin_rom #(
  parameter int unsigned AW  = 5,
  parameter int unsigned DW  = 8,
  parameter int          AMP = 127
) (
  input  logic [AW-1:0]        addr,
  output logic signed [DW-1:0] data
);
  localparam int unsigned N = 1 << AW;
  typedef logic signed [DW-1:0] table_t [N];

  function automatic table_t build_table();
    table_t t;
    real v;
    for (int unsigned i = 0; i < N; i++) begin
      v = $sin(2.0 * 3.14159265358979324 * real'(i) / real'(N)) * real'(AMP);
      t[i] = DW'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign data = TABLE[addr];
endmodule
