// Self-checking testbench of tag_array (N=4, L=4, 12-bit tags): fills every
// set and line with a known tag, then runs random single-set writes and
// all-set reads against a model; reads have one cycle of latency.
module tb_tag_array;
  localparam int N = 4, L = 4, T = 12, LINES = 1 << N;
  logic clk = 1'b0;
  logic [N-1:0] rd_line, wr_line;
  logic [L-1:0][T-1:0] rd;
  logic we;
  logic [1:0] wr_set;
  logic [T-1:0] wr_tag;
  int checks = 0, failures = 0;
  logic [T-1:0] model [L][LINES];

  tag_array #(.N(N), .L(L), .TAG_W(T)) dut (
    .clk, .rd_line_i(rd_line), .rd_tag_o(rd), .we_i(we), .wr_set_i(wr_set),
    .wr_line_i(wr_line), .wr_tag_i(wr_tag));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0][T-1:0] exp_rd;
    we = 0; rd_line = 0;
    @(negedge clk);
    for (int s = 0; s < L; s++)
      for (int i = 0; i < LINES; i++) begin
        we = 1; wr_set = s[1:0]; wr_line = i[N-1:0]; wr_tag = T'(s * 100 + i);
        model[s][i] = wr_tag;
        @(negedge clk);
      end
    we = 0;
    for (int t = 0; t < 1500; t++) begin
      rd_line = N'($urandom_range(0, LINES - 1));
      we = $urandom_range(0, 1) == 1;
      wr_set = 2'($urandom_range(0, L - 1));
      wr_line = N'($urandom_range(0, LINES - 1));
      wr_tag = T'($urandom);
      for (int s = 0; s < L; s++) exp_rd[s] = model[s][rd_line];
      @(posedge clk);
      if (we) model[wr_set][wr_line] = wr_tag;
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
