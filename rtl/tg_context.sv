// Telegraphos contexts with keys and shadow addressing.
//
// The second way of launching special operations, without a special mode:
// each of CONTEXTS contexts is a small register set (operation code, two
// physical addresses, two data words) that the operating system maps into
// the address space of one application. The application writes the
// operation and the data words with ordinary uncached stores. A physical
// address is passed with a store to the shadow of the wanted address
// (the same address with the shadow bit set): the bus delivers the
// translated physical address, and the stored datum names the context
// and the address slot and carries that context's key:
//   sh_data[31:28] context, sh_data[16] slot, sh_data[15:0] key.
// The address is accepted only if the key matches (sh_ok); otherwise it is
// dropped (sh_reject) and counted in rejects. Keys are loaded by the
// operating system through key_wr_*. Contexts keep their contents until
// rewritten, so an application interrupted half-way through an argument
// sequence resumes it. rd_ctx selects the context whose contents appear
// (combinationally) on rd_* for launching.
// Contexts, keys, shadow addresses and the one-store passing of a physical
// address follow the design; the number of contexts, the key width and
// the layout of the stored datum are this design's own choices.
module tg_context
  import tg_pkg::*;
#(
  parameter int unsigned CONTEXTS = 16,
  parameter int unsigned KEY_W    = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // application writes to its context: field 0 op, 1 data0, 2 data1
  input  logic                        wr_valid,
  input  logic [$clog2(CONTEXTS)-1:0] wr_ctx,
  input  logic [1:0]                  wr_field,
  input  word_t                       wr_data,
  // operating system key load
  input  logic                        key_wr_valid,
  input  logic [$clog2(CONTEXTS)-1:0] key_wr_ctx,
  input  logic [KEY_W-1:0]            key_wr_data,
  // shadow store
  input  logic                        sh_valid,
  input  node_t                       sh_node,
  input  waddr_t                      sh_waddr,
  input  word_t                       sh_data,
  output logic                        sh_ok,
  output logic                        sh_reject,
  output logic [15:0]                 rejects,
  // launch view
  input  logic [$clog2(CONTEXTS)-1:0] rd_ctx,
  output sop_e                        rd_op,
  output node_t                       rd_node0,
  output waddr_t                      rd_waddr0,
  output node_t                       rd_node1,
  output waddr_t                      rd_waddr1,
  output word_t                       rd_data0,
  output word_t                       rd_data1
);
  localparam int unsigned CW = $clog2(CONTEXTS);

  typedef struct packed {
    sop_e             op;
    node_t  [1:0]     node;
    waddr_t [1:0]     waddr;
    word_t  [1:0]     data;
    logic [KEY_W-1:0] key;
  } ctx_t;

  ctx_t ctx [CONTEXTS];

  wire [CW-1:0] sh_ctx  = sh_data[28 +: CW];
  wire          sh_slot = sh_data[16];
  wire [KEY_W-1:0] sh_key = sh_data[KEY_W-1:0];

  assign sh_ok     = sh_valid && (ctx[sh_ctx].key == sh_key);
  assign sh_reject = sh_valid && !sh_ok;

  assign rd_op     = ctx[rd_ctx].op;
  assign rd_node0  = ctx[rd_ctx].node[0];
  assign rd_waddr0 = ctx[rd_ctx].waddr[0];
  assign rd_node1  = ctx[rd_ctx].node[1];
  assign rd_waddr1 = ctx[rd_ctx].waddr[1];
  assign rd_data0  = ctx[rd_ctx].data[0];
  assign rd_data1  = ctx[rd_ctx].data[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CONTEXTS; i++) ctx[i] <= '0;
      rejects <= '0;
    end else begin
      if (wr_valid) begin
        unique case (wr_field)
          2'd0:    ctx[wr_ctx].op      <= sop_e'(wr_data[1:0]);
          2'd1:    ctx[wr_ctx].data[0] <= wr_data;
          default: ctx[wr_ctx].data[1] <= wr_data;
        endcase
      end
      if (key_wr_valid) ctx[key_wr_ctx].key <= key_wr_data;
      if (sh_ok) begin
        ctx[sh_ctx].node[sh_slot]  <= sh_node;
        ctx[sh_ctx].waddr[sh_slot] <= sh_waddr;
      end
      if (sh_reject && rejects != '1) rejects <= rejects + 1'b1;
    end
  end
endmodule
