// Ripple-carry array multiplier-accumulator: p = a*b + c + s, all unsigned.
//
// The array has N rows of elementary processors (EPs). Row i adds the partial
// product a & {N{b[i]}} and the bit s[i] (as the row's carry-in) to the upper N
// bits of the running sum, which starts as c. Within a row the carry ripples
// from EP to EP through full adders. Row i retires result bit p[i]; the last
// row's sum is p[2N-1:N]. With N-bit c and s the result always fits in 2N bits,
// so these cells tile: four N x N cells make a 2N x 2N multiplier.
//
// PIPE = 0 gives a purely combinational array (the configuration used by the
// coprocessor). PIPE = 1 places a register rank after every row (pipeline
// granularity one row), giving a latency of N clock cycles and one result per
// cycle; the pipeline registers are cleared by the synchronous active-low reset.
// The function a*b+c+s, the 2..4-bit sizes and the one-rank-per-row pipelining
// option follow the design description; the row organisation (s as the row
// carry-ins, c as the initial sum) is this implementation's choice.
module rc_mult #(
  parameter int unsigned N    = 4,
  parameter bit          PIPE = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   c,
  input  logic [N-1:0]   s,
  output logic [2*N-1:0] p
);

  // Per-row view of the operands, the running sum and the retired low bits.
  // Index r is the input of row r; index N is the array output.
  logic [N-1:0] a_q   [N+1];
  logic [N-1:0] b_q   [N+1];
  logic [N-1:0] s_q   [N+1];
  logic [N-1:0] acc_q [N+1];
  logic [N-1:0] lo_q  [N+1];

  assign a_q[0]   = a;
  assign b_q[0]   = b;
  assign s_q[0]   = s;
  assign acc_q[0] = c;
  assign lo_q[0]  = '0;

  for (genvar r = 0; r < N; r++) begin : g_row
    logic [N-1:0] pp;     // partial product bits of this row
    logic [N:0]   cy;     // carry chain through the row
    logic [N-1:0] sum;
    logic [N-1:0] acc_d;
    logic [N-1:0] lo_d;

    assign pp    = a_q[r] & {N{b_q[r][r]}};
    assign cy[0] = s_q[r][r];
    for (genvar k = 0; k < N; k++) begin : g_ep
      assign sum[k]   = pp[k] ^ acc_q[r][k] ^ cy[k];
      assign cy[k+1]  = (pp[k] & acc_q[r][k]) | (cy[k] & (pp[k] ^ acc_q[r][k]));
    end
    // Retire the row's lowest bit and shift the rest down for the next row.
    assign acc_d = {cy[N], sum[N-1:1]};
    always_comb begin
      lo_d    = lo_q[r];
      lo_d[r] = sum[0];
    end

    if (PIPE) begin : g_reg
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          a_q[r+1]   <= '0;
          b_q[r+1]   <= '0;
          s_q[r+1]   <= '0;
          acc_q[r+1] <= '0;
          lo_q[r+1]  <= '0;
        end else begin
          a_q[r+1]   <= a_q[r];
          b_q[r+1]   <= b_q[r];
          s_q[r+1]   <= s_q[r];
          acc_q[r+1] <= acc_d;
          lo_q[r+1]  <= lo_d;
        end
      end
    end else begin : g_comb
      assign a_q[r+1]   = a_q[r];
      assign b_q[r+1]   = b_q[r];
      assign s_q[r+1]   = s_q[r];
      assign acc_q[r+1] = acc_d;
      assign lo_q[r+1]  = lo_d;
    end
  end

  assign p = {acc_q[N], lo_q[N]};

endmodule
