// locked_design: the example design protected by behavioural semantics
// obfuscation (BSO), with its flip-flops built as mux-D scan cells.
//
// The primary inputs a and b are registered; from the registered values the
// three locked computations of the published architecture figure are made:
//   c1 = a + k_c                 (constant obfuscation,  bso_const_lock)
//   c2 = k_o ? (a - b) : (a + b) (operation obfuscation, bso_op_lock)
//   c3 = (a <= b) ^ k_b          (branch obfuscation,    bso_branch_lock)
// and registered again onto the primary outputs. With the correct key
// (k_c = 8'b11101001, k_o = 0, k_b = 1 for the published example) the outputs
// are a + 8'hE9, a + b and a > b of the inputs sampled two edges earlier.
// Locking adds no cycle: the latency is that of the unlocked design.
//
// Key layout: key = {k_b, k_o, k_c}, KEY_W = DATA_W + 2 bits.
// Scan: all 4*DATA_W + 1 flip-flops form the vector cells, packed as
// {c3, c2, c1, b, a}. With se high every cell loads its own scan input
// scan_si[i] instead of its functional value; chains are stitched outside,
// so cells[i] is also the scan output of cell i. chip_rst clears the cells
// asynchronously.
//
// The three locked expressions and the 8-bit width follow the published
// examples. The input and output registers, their reset and the bit order of
// the cell vector are this design's own; the figure places the design's
// flip-flops in scan chains but does not say which signals they hold.
module locked_design #(
  parameter int unsigned DATA_W = 8,
  localparam int unsigned KEY_W   = DATA_W + 2,
  localparam int unsigned N_CELLS = 4 * DATA_W + 1
) (
  input  logic               clk,
  input  logic               chip_rst,
  input  logic               se,
  input  logic [DATA_W-1:0]  a,
  input  logic [DATA_W-1:0]  b,
  input  logic [KEY_W-1:0]   key,
  input  logic [N_CELLS-1:0] scan_si,
  output logic [N_CELLS-1:0] cells,
  output logic [DATA_W-1:0]  c1,
  output logic [DATA_W-1:0]  c2,
  output logic               c3
);

  typedef struct packed {
    logic              c3;
    logic [DATA_W-1:0] c2;
    logic [DATA_W-1:0] c1;
    logic [DATA_W-1:0] b;
    logic [DATA_W-1:0] a;
  } dstate_t;

  dstate_t st_q, st_func;

  logic [DATA_W-1:0] k_c;
  logic              k_o, k_b;
  logic [DATA_W-1:0] c1_d, c2_d;
  logic              c3_d;

  assign {k_b, k_o, k_c} = key;

  bso_const_lock  #(.W(DATA_W)) u_const  (.in_val(st_q.a), .k_c(k_c), .out_val(c1_d));
  bso_op_lock     #(.W(DATA_W)) u_op     (.a(st_q.a), .b(st_q.b), .k_o(k_o), .out_val(c2_d));
  bso_branch_lock #(.W(DATA_W)) u_branch (.a(st_q.a), .b(st_q.b), .k_b(k_b), .cond(c3_d));

  always_comb begin
    st_func.a  = a;
    st_func.b  = b;
    st_func.c1 = c1_d;
    st_func.c2 = c2_d;
    st_func.c3 = c3_d;
  end

  always_ff @(posedge clk or posedge chip_rst) begin
    if (chip_rst) st_q <= '0;
    else if (se)  st_q <= dstate_t'(scan_si);
    else          st_q <= st_func;
  end

  assign cells = st_q;
  assign c1    = st_q.c1;
  assign c2    = st_q.c2;
  assign c3    = st_q.c3;

endmodule
