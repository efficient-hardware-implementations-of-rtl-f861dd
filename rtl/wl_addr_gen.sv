// wl_addr_gen: word-line address sequencer of the synaptic memory.
//
// Each input neuron j owns TAU consecutive kernel word lines, j*TAU + k for
// window bit k (delay k+1), and the bias (gamma) line is GAMMA_WL, which is
// read at every time step. After `start` the unit first issues the gamma
// read, then visits the input neurons in order. For the visited neuron it
// takes the spike window from the shared window mux and issues one read per
// set bit, lowest bit first, clearing each bit as it goes; a neuron with an
// empty window costs one idle cycle. The base address of the visited neuron
// is kept in an address register that steps by TAU, playing the role of the
// address storage registers. The document gives the word-line mapping and
// the sequential reading; the visiting order, the one-cycle cost of an empty
// window and the gamma-first order are this design's choices.
//
// The array is slower than the logic: after every read the sequencer waits
// RD_CYC - 1 cycles before its next action (RD_CYC = 5: a 100 MHz array
// under 500 MHz logic, the clocks of the document). The wait-cycle model of
// the array's speed is this design's own.
//
// Timing: one read request (rd_en, rd_addr, rd_neg, rd_bias) every RD_CYC
// cycles at most; `done` is high in the last cycle of the step's scan.
// With R = 1 + sum over j of popcount(window_j) reads, scan length =
// 1 + sum over j of max(1, popcount(window_j)) + (RD_CYC - 1) * R.
module wl_addr_gen #(
  parameter int unsigned N_IN     = spinaps_pkg::N_IN_D,
  parameter int unsigned TAU      = spinaps_pkg::TAU_D,
  parameter int unsigned WL       = spinaps_pkg::WL_D,
  parameter int unsigned GAMMA_WL = N_IN * TAU,
  parameter int unsigned RD_CYC   = spinaps_pkg::RD_CYC_D,
  localparam int unsigned CW      = (RD_CYC > 1) ? $clog2(RD_CYC) : 1,
  localparam int unsigned NW      = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int unsigned AW      = $clog2(WL)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,    // begin the reads of one time step
  output logic [NW-1:0]   nidx,     // input neuron visited (to the window mux)
  input  logic [TAU-1:0]  window,   // its spike window
  input  logic            neg,      // its input sign
  output logic            rd_en,
  output logic [AW-1:0]   rd_addr,
  output logic            rd_neg,   // negate the weights of this read
  output logic            rd_bias,  // this read is the gamma line
  output logic            busy,
  output logic            done
);

  typedef enum logic [1:0] {A_IDLE, A_BIAS, A_SCAN, A_TAIL} agen_state_e;

  agen_state_e       state;
  logic [NW-1:0]     j;
  logic [AW-1:0]     base;     // address register: j*TAU
  logic              fresh;    // window of neuron j not yet loaded
  logic [TAU-1:0]    rem;      // bits of neuron j still to read

  logic [TAU-1:0]    mask, rem_n;
  logic [$clog2(TAU+1)-1:0] k;
  logic              last_of_neuron;
  logic [CW-1:0]     gap;      // cycles still to wait for the array
  logic              wait_rd;
  logic              last_rd;  // the final action of the scan is a read that needs a gap

  assign wait_rd = (gap != '0);

  always_comb begin
    mask  = fresh ? window : rem;
    k     = '0;
    for (int b = TAU - 1; b >= 0; b--) if (mask[b]) k = b[$clog2(TAU+1)-1:0];
    rem_n = mask & (mask - 1'b1);
    last_of_neuron = (rem_n == '0);
  end

  assign nidx = j;
  assign busy = (state != A_IDLE);

  always_comb begin
    rd_en   = 1'b0;
    rd_addr = '0;
    rd_neg  = 1'b0;
    rd_bias = 1'b0;
    done    = 1'b0;
    last_rd = 1'b0;
    unique case (state)
      A_BIAS: if (!wait_rd) begin
        rd_en   = 1'b1;
        rd_addr = AW'(GAMMA_WL);
        rd_bias = 1'b1;
      end
      A_SCAN: if (!wait_rd) begin
        rd_en   = (mask != '0);
        rd_addr = base + AW'(k);
        rd_neg  = neg;
        last_rd = rd_en && (RD_CYC > 1);
        done    = last_of_neuron && (j == NW'(N_IN - 1)) && !last_rd;
      end
      A_TAIL: done = (gap == CW'(1));
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A_IDLE;
      j     <= '0;
      base  <= '0;
      fresh <= 1'b1;
      rem   <= '0;
      gap   <= '0;
    end else if (wait_rd) begin
      gap <= gap - 1'b1;
      if (state == A_TAIL && gap == CW'(1)) state <= A_IDLE;
    end else begin
      if (rd_en && RD_CYC > 1) gap <= CW'(RD_CYC - 1);
      unique case (state)
        A_IDLE: if (start) state <= A_BIAS;
        A_BIAS: begin
          state <= A_SCAN;
          j     <= '0;
          base  <= '0;
          fresh <= 1'b1;
        end
        A_SCAN: begin
          if (last_of_neuron) begin
            fresh <= 1'b1;
            if (j == NW'(N_IN - 1)) begin
              state <= last_rd ? A_TAIL : A_IDLE;
              j     <= '0;
              base  <= '0;
            end else begin
              j    <= j + 1'b1;
              base <= base + AW'(TAU);
            end
          end else begin
            fresh <= 1'b0;
            rem   <= rem_n;
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

endmodule
