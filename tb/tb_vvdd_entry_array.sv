// tb_vvdd_entry_array: writes and reads entries through all ports, powers
// entries down and up, and checks that a powered-down entry loses its
// content to all ones, ignores writes while its rail is down, and that the
// rail follows the enable one cycle later. Other entries keep their data.
module tb_vvdd_entry_array;
  localparam int N = 8, DW = 16, RD = 4, WR = 2;
  logic clk = 0, rst_n;
  logic [N-1:0] vdd_en, rail_up;
  logic          wr_en   [WR];
  logic [2:0]    wr_idx  [WR];
  logic [DW-1:0] wr_data [WR];
  logic [2:0]    rd_idx  [RD];
  logic [DW-1:0] rd_data [RD];
  logic [DW-1:0] model [N];
  logic [N-1:0]  mrail;
  int checks = 0, failures = 0;

  vvdd_entry_array #(.N(N), .DW(DW), .RD_PORTS(RD), .WR_PORTS(WR)) dut (
    .clk, .rst_n, .vdd_en, .rail_up, .wr_en, .wr_idx, .wr_data, .rd_idx, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int flips = 0;
    rst_n = 0; vdd_en = '1;
    for (int p = 0; p < WR; p++) begin wr_en[p] = 0; wr_idx[p] = 0; wr_data[p] = 0; end
    for (int p = 0; p < RD; p++) rd_idx[p] = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < N; i++) model[i] = '0;
    mrail = '1;
    for (int t = 0; t < 3000; t++) begin
      // random rail enables, mostly on
      for (int i = 0; i < N; i++) vdd_en[i] = ($urandom_range(0, 9) != 0);
      wr_en[0] = $urandom_range(0, 1); wr_idx[0] = 3'($urandom_range(0, N-1)); wr_data[0] = DW'($urandom);
      wr_en[1] = $urandom_range(0, 1);
      do wr_idx[1] = 3'($urandom_range(0, N-1)); while (wr_idx[1] == wr_idx[0]);
      wr_data[1] = DW'($urandom);
      @(posedge clk); #1;
      // model: flip entries whose rail was down, then apply writes to powered ones
      for (int i = 0; i < N; i++) if (!mrail[i]) begin
        if (model[i] != '1) flips++;
        model[i] = '1;
      end
      for (int p = 0; p < WR; p++) if (wr_en[p] && mrail[wr_idx[p]]) model[wr_idx[p]] = wr_data[p];
      mrail = vdd_en;
      checks++;
      if (rail_up !== mrail) begin failures++; $display("FAIL rail %b exp %b", rail_up, mrail); end
      for (int p = 0; p < RD; p++) rd_idx[p] = 3'($urandom_range(0, N-1));
      #1;
      for (int p = 0; p < RD; p++) begin
        checks++;
        if (rd_data[p] !== model[rd_idx[p]]) begin
          failures++; $display("FAIL port %0d entry %0d read %h exp %h", p, rd_idx[p], rd_data[p], model[rd_idx[p]]);
        end
      end
    end
    checks++;
    if (flips == 0) begin failures++; $display("FAIL no bit flip seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
