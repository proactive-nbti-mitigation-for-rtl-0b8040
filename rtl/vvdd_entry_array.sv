// vvdd_entry_array: behavioural model of the storage entries of one
// functional unit, each cell built with separate virtual Vdd rails for its
// two cross-coupled PMOS transistors and one rail driver per entry.
//
// This is a behavioural model of a custom SRAM-style array, not logic to be
// synthesized as such. It models what the recovery controller relies on:
// - each entry's rail follows its `vdd_en` one clock later (the 2- or
//   3-stage buffer moves the rail within 150 ps, one cycle at 2 GHz);
// - while an entry's rail is down, pulling the left PMOS rail to ground
//   flips every cell that held 0 to 1 (automatic bit flipping), so the
//   entry reads all ones and its old content is lost; no aligning write or
//   backup copy is needed because only free entries are powered down;
// - writes to an entry whose rail is down are dropped.
// The 4 read and 2 write ports follow the register entry the design was
// characterised with; synchronous writes, combinational reads and the
// reset value (all zeros, rails up) are this model's own choices.
module vvdd_entry_array #(
  parameter int unsigned N        = 128,
  parameter int unsigned DW       = 64,
  parameter int unsigned RD_PORTS = 4,
  parameter int unsigned WR_PORTS = 2,
  localparam int unsigned IW      = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  vdd_en,
  output logic [N-1:0]  rail_up,
  input  logic          wr_en   [WR_PORTS],
  input  logic [IW-1:0] wr_idx  [WR_PORTS],
  input  logic [DW-1:0] wr_data [WR_PORTS],
  input  logic [IW-1:0] rd_idx  [RD_PORTS],
  output logic [DW-1:0] rd_data [RD_PORTS]
);

  logic [DW-1:0] cells [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rail_up <= '1;
      for (int unsigned i = 0; i < N; i++) cells[i] <= '0;
    end else begin
      rail_up <= vdd_en;
      for (int unsigned i = 0; i < N; i++)
        if (!rail_up[i]) cells[i] <= '1;  // automatic bit flip to 1
      for (int unsigned p = 0; p < WR_PORTS; p++)
        if (wr_en[p] && int'(wr_idx[p]) < N && rail_up[wr_idx[p]])
          cells[wr_idx[p]] <= wr_data[p];
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < RD_PORTS; p++)
      rd_data[p] = (int'(rd_idx[p]) < N) ? cells[rd_idx[p]] : '0;
  end

endmodule
