// Self-checking testbench of data_array (N=3, L=2, 16-byte lines): random
// writes with random byte enables against a byte-level model, reads of the
// whole line of both sets one cycle later.
module tb_data_array;
  localparam int N = 3, L = 2, LB = 16, LINES = 1 << N;
  logic clk = 1'b0;
  logic [N-1:0] rd_line, wr_line;
  logic [L-1:0][LB*8-1:0] rd;
  logic we;
  logic [0:0] wr_set;
  logic [LB-1:0] be;
  logic [LB*8-1:0] wdata;
  int checks = 0, failures = 0;
  logic [LB*8-1:0] model [L][LINES];

  data_array #(.N(N), .L(L), .LINE_BYTES(LB)) dut (
    .clk, .rd_line_i(rd_line), .rd_data_o(rd), .we_i(we), .wr_set_i(wr_set),
    .wr_line_i(wr_line), .wr_be_i(be), .wr_data_i(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0][LB*8-1:0] exp_rd;
    we = 0; rd_line = 0;
    @(negedge clk);
    for (int s = 0; s < L; s++)
      for (int i = 0; i < LINES; i++) begin
        we = 1; wr_set = s[0:0]; wr_line = i[N-1:0]; be = '1;
        wdata = {4{$urandom}};
        model[s][i] = wdata;
        @(negedge clk);
      end
    for (int t = 0; t < 1500; t++) begin
      rd_line = N'($urandom_range(0, LINES - 1));
      we = $urandom_range(0, 1) == 1;
      wr_set = 1'($urandom_range(0, 1));
      wr_line = N'($urandom_range(0, LINES - 1));
      be = LB'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      for (int s = 0; s < L; s++) exp_rd[s] = model[s][rd_line];
      @(posedge clk);
      if (we)
        for (int b = 0; b < LB; b++)
          if (be[b]) model[wr_set][wr_line][8*b +: 8] = wdata[8*b +: 8];
      #1;
      checks++;
      if (rd !== exp_rd) begin
        failures++;
        if (failures < 8) $display("line %0d: got %h expected %h", rd_line, rd, exp_rd);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
