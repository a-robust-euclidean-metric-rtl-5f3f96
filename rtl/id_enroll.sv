// id_enroll: forms the nominal ID of a device, the element-wise mean of
// N_AVG ID samples.
//
// `clear` starts a new average. Each `id_valid` adds `id_in` into N_ID
// signed accumulators, until N_AVG samples have been taken; later samples are
// ignored until the next `clear`. The means are then computed one element per
// cycle (N_ID cycles) with a single multiplier: the quotient sum / N_AVG,
// rounded toward zero, is formed as |sum| * ceil(2^S / N_AVG) >> S, with S
// large enough that the result equals the exact integer quotient. `done`
// pulses one cycle after the last element is written; `nominal` then holds the
// mean ID until the next average completes.
`timescale 1ps / 1ps
module id_enroll #(
  parameter int unsigned N_ID   = 31,
  parameter int unsigned K_BITS = 24,
  parameter int unsigned N_AVG  = 255
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic signed [K_BITS-1:0] id_in   [N_ID],
  input  logic                     id_valid,
  output logic signed [K_BITS-1:0] nominal [N_ID],
  output logic                     done
);

  localparam int unsigned CW   = $clog2(N_AVG + 1);
  localparam int unsigned SUMW = K_BITS + CW;            // holds N_AVG * 2^(K-1)
  localparam int unsigned S    = SUMW + CW + 1;
  localparam logic [S:0]  RECIP = ((S+1)'(1) << S) / (S+1)'(N_AVG)
                                + ((((S+1)'(1) << S) % (S+1)'(N_AVG)) != 0 ? 1 : 0);
  localparam int unsigned IW   = (N_ID > 1) ? $clog2(N_ID) : 1;

  logic signed [SUMW-1:0] acc [N_ID];
  logic [CW-1:0]          cnt;
  logic                   dividing;
  logic [IW-1:0]          j;

  logic signed [SUMW-1:0] sel_sum;
  logic [SUMW-1:0]        mag;
  logic [SUMW+S:0]        prod;
  logic [SUMW-1:0]        quot;

  always_comb begin
    sel_sum = '0;
    for (int i = 0; i < N_ID; i++)
      if (j == IW'(i)) sel_sum = acc[i];
    mag  = sel_sum[SUMW-1] ? SUMW'(-sel_sum) : SUMW'(sel_sum);
    prod = (SUMW+S+1)'(mag) * (SUMW+S+1)'(RECIP);
    quot = SUMW'(prod >> S);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      dividing <= 1'b0;
      j        <= '0;
      done     <= 1'b0;
      for (int i = 0; i < N_ID; i++) begin
        acc[i]     <= '0;
        nominal[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (clear) begin
        cnt      <= '0;
        dividing <= 1'b0;
        for (int i = 0; i < N_ID; i++) acc[i] <= '0;
      end else if (dividing) begin
        for (int i = 0; i < N_ID; i++)
          if (j == IW'(i))
            nominal[i] <= sel_sum[SUMW-1] ? -K_BITS'(quot) : K_BITS'(quot);
        if (j == IW'(N_ID - 1)) begin
          dividing <= 1'b0;
          done     <= 1'b1;
        end else begin
          j <= j + 1'b1;
        end
      end else if (id_valid && cnt < CW'(N_AVG)) begin
        for (int i = 0; i < N_ID; i++) acc[i] <= acc[i] + SUMW'(id_in[i]);
        cnt <= cnt + 1'b1;
        if (cnt == CW'(N_AVG - 1)) begin
          dividing <= 1'b1;
          j        <= '0;
        end
      end
    end
  end

endmodule
