// Synchronous first-in first-out buffer with valid/ready handshakes on both
// sides. Helper for the HIB's link interfaces.
//
// DEPTH entries of WIDTH bits held in a register array, addressed by wrap-
// around read and write pointers with one extra bit to tell full from empty.
// A word written in one cycle can be read from the next cycle on (no
// fall-through). in_ready is low when full; out_valid is high when not empty.
// Both sides may transfer in the same cycle. DEPTH must be a power of two.
module tg_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW:0]      wr_ptr, rd_ptr;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign level     = wr_ptr - rd_ptr;
  assign in_ready  = (level != (PW+1)'(DEPTH));
  assign out_valid = (level != '0);
  assign out_data  = mem[rd_ptr[PW-1:0]];

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH-1)) == 0)
    else $error("tg_fifo: DEPTH must be a power of two");

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr[PW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end
endmodule
