// pipe_div - pipelined restoring divider with a bounded quotient.
//
// Computes q = floor(n / d) for unsigned n and d > 0 when the quotient fits in
// QB bits; otherwise it raises ovf (and q is meaningless).  Knowing that the
// quotient has only QB bits lets the divider skip the leading quotient bits a
// full NW-bit division would compute: the input stage tests n >= d * 2^QB,
// and each of the QB following stages resolves one quotient bit, from the most
// significant down, by trying to subtract d * 2^i from the partial remainder.
//
// Timing: fully pipelined, one division per clock; a result appears QB+1
// clocks after its operands.  tag travels with the operands unchanged.
// The radix-2 restoring structure is this implementation's choice.
module pipe_div #(
  parameter int unsigned NW    = 43,  // dividend width
  parameter int unsigned DW    = 39,  // divisor width
  parameter int unsigned QB    = 13,  // quotient bits
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NW-1:0]    n,
  input  logic [DW-1:0]    d,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [QB-1:0]    q,
  output logic             ovf,
  output logic [TAG_W-1:0] out_tag
);

  // partial remainders stay below d * 2^QB once ovf is clear
  localparam int unsigned RW = ((NW > DW + QB) ? NW : DW + QB) + 1;

  typedef struct packed {
    logic             valid;
    logic [RW-1:0]    r;
    logic [DW-1:0]    d;
    logic [QB-1:0]    q;
    logic             ovf;
    logic [TAG_W-1:0] tag;
  } stage_t;

  stage_t st [QB+1];

  // input stage: overflow test
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st[0] <= '0;
    end else begin
      st[0].valid <= in_valid;
      st[0].r     <= RW'(n);
      st[0].d     <= d;
      st[0].q     <= '0;
      st[0].ovf   <= (RW'(n) >= (RW'(d) << QB));
      st[0].tag   <= in_tag;
    end
  end

  // one quotient bit per stage, most significant first
  for (genvar s = 1; s <= QB; s++) begin : g_stage
    localparam int unsigned BIT = QB - s;
    logic [RW-1:0] trial;
    logic          take;
    always_comb begin
      trial = RW'(st[s-1].d) << BIT;
      take  = (st[s-1].r >= trial);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[s] <= '0;
      end else begin
        st[s]        <= st[s-1];
        st[s].r      <= take ? (st[s-1].r - trial) : st[s-1].r;
        st[s].q[BIT] <= take;
      end
    end
  end : g_stage

  assign out_valid = st[QB].valid;
  assign q         = st[QB].q;
  assign ovf       = st[QB].ovf;
  assign out_tag   = st[QB].tag;

endmodule
