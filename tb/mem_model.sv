// Behavioural model of the main memory behind the data cache (not part of
// the design). Words that were never written read as init_word(addr), a
// fixed hash of the address, so a checker can know every word without a
// table. Every request is acknowledged LAT cycles after it is raised, with a
// one-cycle ack pulse that carries the read data; the request must stay
// stable until then. Stores honour the byte enables.
module mem_model #(
  parameter int unsigned LAT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_i,
  input  logic        we_i,
  input  logic [31:0] addr_i,
  input  logic [31:0] wdata_i,
  input  logic [3:0]  be_i,
  output logic        ack_o,
  output logic [31:0] rdata_o,
  output int unsigned n_reads,
  output int unsigned n_writes
);

  logic [31:0] mem [bit [29:0]];
  int unsigned wait_q;

  function automatic logic [31:0] init_word(input logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [31:0] peek(input logic [31:0] a);
    if (mem.exists(a[31:2])) return mem[a[31:2]];
    return init_word({a[31:2], 2'b00});
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      wait_q   <= 0;
      ack_o    <= 1'b0;
      rdata_o  <= '0;
      n_reads  <= 0;
      n_writes <= 0;
    end else begin
      ack_o <= 1'b0;
      if (req_i && !ack_o) begin
        if (wait_q + 1 >= LAT) begin
          wait_q <= 0;
          ack_o  <= 1'b1;
          if (we_i) begin
            logic [31:0] w;
            w = peek(addr_i);
            for (int b = 0; b < 4; b++) if (be_i[b]) w[8*b +: 8] = wdata_i[8*b +: 8];
            mem[addr_i[31:2]] = w;
            n_writes <= n_writes + 1;
          end else begin
            rdata_o <= peek(addr_i);
            n_reads <= n_reads + 1;
          end
        end else begin
          wait_q <= wait_q + 1;
        end
      end
    end
  end

endmodule
