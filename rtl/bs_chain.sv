// bs_chain -- the boundary scan register: one type-1 cell per chip pin.
//
// N_IN input cells sit between the input pins and the core, N_OUT output
// cells between the core and the output pins. All cells form one serial
// chain: si enters input cell 0, runs through the input cells in index
// order and then through the output cells, and so leaves the last output
// cell. Input cells take mode_in, output cells mode_out; all other controls
// are shared. The defaults, two inputs and one output, are the sample chip
// of the published design; the chain order (inputs first) follows its
// block diagram, where the output cell is last before TDO.
module bs_chain #(
  parameter int unsigned N_IN  = 2,
  parameter int unsigned N_OUT = 1
) (
  input  logic             capture_clk,
  input  logic             update_clk,
  input  logic             capture_en,
  input  logic             update_en,
  input  logic             shift_dr,
  input  logic             mode_in,
  input  logic             mode_out,
  input  logic             si,
  output logic             so,
  input  logic [N_IN-1:0]  pin_in,    // from the input pins
  output logic [N_IN-1:0]  core_in,   // to the core
  input  logic [N_OUT-1:0] core_out,  // from the core
  output logic [N_OUT-1:0] pin_out    // to the output pins
);

  localparam int unsigned N = N_IN + N_OUT;

  logic [N:0] chain;

  assign chain[0] = si;
  assign so       = chain[N];

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    bsc u_cell (
      .capture_clk, .update_clk, .capture_en, .update_en, .shift_dr,
      .mode     (mode_in),
      .si       (chain[i]),
      .data_in  (pin_in[i]),
      .so       (chain[i+1]),
      .data_out (core_in[i])
    );
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    bsc u_cell (
      .capture_clk, .update_clk, .capture_en, .update_en, .shift_dr,
      .mode     (mode_out),
      .si       (chain[N_IN+j]),
      .data_in  (core_out[j]),
      .so       (chain[N_IN+j+1]),
      .data_out (pin_out[j])
    );
  end

endmodule
