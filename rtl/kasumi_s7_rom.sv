// kasumi_s7_rom - dual-port synchronous ROM holding the KASUMI S7 S-box.
//
// 128 words of 7 bits, read through two independent ports, each with a
// registered output: the data for an address presented before a clock edge
// appear after that edge. NEG_EDGE selects the active edge (1 = falling),
// which the dual-port FI uses to fit two S-box stages into one system clock.
// The array is written so that synthesis maps it to one embedded block
// memory (two on devices whose blocks hold fewer than 128x7 bits).
// Contents are the S7 table of the KASUMI specification, read from
// rtl/kasumi_s7.hex (one hexadecimal word per line, entry 0 first).
module kasumi_s7_rom #(
  parameter bit NEG_EDGE = 1'b0
) (
  input  logic         clk,
  input  logic [6:0]   addr_a,
  input  logic [6:0]   addr_b,
  output logic [6:0]   data_a,
  output logic [6:0]   data_b
);

  logic [6:0] rom [128];

  initial $readmemh("rtl/kasumi_s7.hex", rom);

  if (NEG_EDGE) begin : g_neg
    always_ff @(negedge clk) begin
      data_a <= rom[addr_a];
      data_b <= rom[addr_b];
    end
  end else begin : g_pos
    always_ff @(posedge clk) begin
      data_a <= rom[addr_a];
      data_b <= rom[addr_b];
    end
  end

endmodule
