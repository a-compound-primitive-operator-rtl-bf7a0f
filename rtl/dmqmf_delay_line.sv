// dmqmf_delay_line: tapped delay line of a DMQMF stage.
//
// The DMQMF is a symmetric FIR whose delay elements each hold D samples: 1 in
// the first stage of a bank, 2 in the second and 4 in the third. The line
// here is one shift register of 2*HALF*DMAX+1 words, long enough for the
// largest D; a multiplexer per tap picks the word that is m*D samples either
// side of the centre for the D chosen at run time (D = 2**dsel). A stage can
// thus serve as any stage of an analysis bank or, in reverse order, of a
// synthesis bank.
//
// Interface: one word enters per clock on d_in. centre is the word that
// entered HALF*D clocks ago (x[n]); ahead[m] is x[n+mD] (newer) and
// behind[m] is x[n-mD] (older), for m = 1..HALF; index 0 of both is unused
// and reads zero. Taps are taken straight from the registers (no extra
// latency). Reset clears the line, so samples before the start read as zero.
//
// Inter-tap delay of D sample periods follows the source design; the single
// shared register chain with a run-time D multiplexer is this design's own
// choice.
module dmqmf_delay_line #(
  parameter int unsigned W        = 13,  // word width
  parameter int unsigned HALF     = 7,   // taps each side of the centre
  parameter int unsigned DSEL_MAX = 2    // largest dsel: DMAX = 2**DSEL_MAX
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           dsel,          // D = 2**dsel, dsel <= DSEL_MAX
  input  logic [W-1:0]         d_in,
  output logic [W-1:0]         centre,
  output logic [W-1:0]         ahead  [HALF+1],
  output logic [W-1:0]         behind [HALF+1]
);

  localparam int unsigned DMAX = 1 << DSEL_MAX;
  localparam int unsigned LEN  = 2 * HALF * DMAX + 1;

  logic [W-1:0] line [LEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) line[i] <= '0;
    end else begin
      line[0] <= d_in;
      for (int i = 1; i < LEN; i++) line[i] <= line[i-1];
    end
  end

  // line[0] holds the newest word; the centre sits HALF*D words back.
  always_comb begin
    centre = line[HALF];
    for (int m = 0; m <= HALF; m++) begin
      ahead[m]  = '0;
      behind[m] = '0;
    end
    for (int s = 0; s <= DSEL_MAX; s++) begin
      if (int'(dsel) == s) begin
        centre = line[HALF << s];
        for (int m = 1; m <= HALF; m++) begin
          ahead[m]  = line[(HALF - m) << s];
          behind[m] = line[(HALF + m) << s];
        end
      end
    end
  end

endmodule
