// idr_commutator: commutator of an R4SDC stage built from six dual-port RAMs
// with the IDR interconnection.
//
// A stage of N_t points reads its input as four quarters A0..A3 of Q = N_t/4
// words.  For every position q of a quarter the butterfly needs the four words
// A0[q]..A3[q] at once, once for each of its four outputs m = 0..3.  The
// commutator delivers them during four periods of Q cycles: period m=0 runs
// while A3 of a frame arrives, periods 1..3 while A0..A2 of the next frame
// arrive, so a stage streams one sample per cycle in and out.
//
// Storage is six RAMs of Q words, DM0..DM5, in two chains fed by the input:
// DM0 -> DM2 -> DM4 and DM1 -> DM3 -> DM5.  When a RAM is written, the word
// it held at that address is read out and moved one RAM down its chain.  The
// RAMs written per period (counted from the output index m) are
//     m = 0: DM1 DM3      m = 1: DM0 DM2 DM4
//     m = 2: DM1 DM3 DM5  m = 3: DM0 DM2
// so a RAM is written 5/3 times per frame on average, and a word that is no
// longer needed is simply overwritten.  Four multiplexers pick the outputs:
//     O1 from {C, D}, O2 from {In, C, D}, O3 from {A, B, E, F}, O4 from {A, B, E}
// where In is the stage input and A..F the read data of DM0..DM5.  The words
// leave in an order that changes with m; idx[i] tells which quarter O(i+1)
// holds, and the butterfly applies the matching rotation.
//
// The RAM count, the two chains, the write-enable table and the multiplexer
// inputs follow the IDR commutator; the period alignment, the common read and
// write address q, and the output-order tags are this design's reading of it.
// A RAM whose read data is not needed in a period (neither selected by a
// multiplexer nor moved to the next RAM) has its read enable low and keeps its
// previous output, so only 16 of the 24 RAM reads per position take place:
//     m = 0: DM0-DM2      m = 1: DM0-DM3
//     m = 2: DM1-DM4      m = 3: DM0 DM2-DM5
// These read enables follow from the write table and the multiplexers.
//
// Interface: in_valid advances the commutator by one sample.  The outputs are
// combinational from the RAMs and x_in; out_valid marks a cycle whose outputs
// belong to a complete frame (from the first A3 word on), with m and q the
// output index and position of that cycle.
module idr_commutator
  import fft_pkg::*;
#(
  parameter int unsigned Q = 4,   // words per quarter, N_t/4
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned CW = $clog2(4 * Q)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  cplx_t         x_in,
  output logic          out_valid,
  output cplx_t         o   [4],
  output logic [1:0]    idx [4],
  output logic [1:0]    m,
  output logic [QW-1:0] q
);

  logic [CW-1:0] count;           // input sample index within a frame
  logic [1:0]    p_in;            // quarter of the current input word
  logic          primed;          // an A3 word has been seen
  logic [5:0]    cs;              // chip selects of DM0..DM5
  logic [5:0]    re;              // read enables of DM0..DM5
  cplx_t         din  [6];
  cplx_t         rdat [6];        // A..F
  logic [QW-1:0] addr;

  assign p_in = count[CW-1 -: 2];
  assign m    = p_in + 2'd1;
  if (Q > 1) begin : g_addr
    assign addr = count[QW-1:0];
  end else begin : g_addr1
    assign addr = '0;
  end
  assign q = addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count  <= '0;
      primed <= 1'b0;
    end else if (in_valid) begin
      count <= count + 1'b1;
      if (p_in == 2'd3) primed <= 1'b1;
    end
  end

  assign out_valid = in_valid && (primed || p_in == 2'd3);

  // Write enables per output period.
  always_comb begin
    unique case (m)
      2'd0: cs = 6'b001010;
      2'd1: cs = 6'b010101;
      2'd2: cs = 6'b101010;
      default: cs = 6'b000101;
    endcase
    if (!in_valid) cs = '0;
  end

  // Read enables: RAMs feeding a multiplexer or the next RAM of a chain.
  always_comb begin
    unique case (m)
      2'd0: re = 6'b000111;
      2'd1: re = 6'b001111;
      2'd2: re = 6'b011110;
      default: re = 6'b111101;
    endcase
    if (!in_valid) re = '0;
  end

  assign din[0] = x_in;
  assign din[1] = x_in;
  assign din[2] = rdat[0];
  assign din[3] = rdat[1];
  assign din[4] = rdat[2];
  assign din[5] = rdat[3];

  for (genvar i = 0; i < 6; i++) begin : g_dm
    idr_dpram #(.DEPTH(Q)) u_dm (
      .clk (clk),
      .cs  (cs[i]),
      .wad (addr),
      .din (din[i]),
      .re  (re[i]),
      .rad (addr),
      .dout(rdat[i])
    );
  end

  // Output multiplexers (A=rdat[0] ... F=rdat[5]).
  always_comb begin
    unique case (m)
      2'd0: begin
        o[0] = rdat[2]; o[1] = x_in;    o[2] = rdat[0]; o[3] = rdat[1];
        idx  = '{2'd0, 2'd3, 2'd2, 2'd1};
      end
      2'd1: begin
        o[0] = rdat[3]; o[1] = rdat[2]; o[2] = rdat[0]; o[3] = rdat[1];
        idx  = '{2'd1, 2'd0, 2'd2, 2'd3};
      end
      2'd2: begin
        o[0] = rdat[2]; o[1] = rdat[3]; o[2] = rdat[4]; o[3] = rdat[1];
        idx  = '{2'd2, 2'd1, 2'd0, 2'd3};
      end
      default: begin
        o[0] = rdat[3]; o[1] = rdat[2]; o[2] = rdat[5]; o[3] = rdat[4];
        idx  = '{2'd3, 2'd2, 2'd1, 2'd0};
      end
    endcase
  end

endmodule
