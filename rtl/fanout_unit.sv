// fanout_unit: sends the output spikes of a step to their destinations.
//
// Every output neuron has FANOUT destination entries stored in spare word
// lines of the synaptic array, right after the gamma line. An entry is a
// destination core (CORE_W bits) and a word line in that core (WLA_W
// bits). PER_LINE neurons share one word line: neuron n uses line
// BASE_WL + n / PER_LINE, bits [(n % PER_LINE) * FANOUT*(CORE_W+WLA_W) +:
// FANOUT*(CORE_W+WLA_W)], entry e at offset e*(CORE_W+WLA_W) with the word
// line in the low bits. At the defaults (2048-bit lines, 4 entries of 23
// bits) 22 neurons share a line and the 256 neurons take 12 lines, lines
// 1793-1804. The number of entries, their field widths and storing them
// in the array follow the document; the packing, the order of sending and
// the "no destination" code (word line all ones) are this design's own.
//
// After `start` (with the spike vector), the unit visits the spiking
// neurons from the lowest index: one array read, RD_CYC cycles for the data
// (the array runs at a fifth of the logic clock by default), then one packet
// per valid entry on a valid/ready output. `done` pulses
// when all packets of the step have been accepted (in the cycle after
// start if no neuron spiked).
module fanout_unit #(
  parameter int unsigned N_OUT   = spinaps_pkg::N_OUT_D,
  parameter int unsigned WIDTH   = spinaps_pkg::N_OUT_D * spinaps_pkg::B_D,
  parameter int unsigned WL      = spinaps_pkg::WL_D,
  parameter int unsigned BASE_WL = spinaps_pkg::N_IN_D * spinaps_pkg::TAU_D + 1,
  parameter int unsigned FANOUT  = 4,
  parameter int unsigned CORE_W  = 12,
  parameter int unsigned WLA_W   = 11,
  parameter int unsigned RD_CYC  = spinaps_pkg::RD_CYC_D,
  localparam int unsigned ENT_W    = CORE_W + WLA_W,
  localparam int unsigned NEUR_W   = FANOUT * ENT_W,
  localparam int unsigned PER_LINE = WIDTH / NEUR_W,
  localparam int unsigned AW       = $clog2(WL),
  localparam int unsigned IW       = (N_OUT > 1) ? $clog2(N_OUT) : 1,
  localparam int unsigned EW       = (FANOUT > 1) ? $clog2(FANOUT) : 1,
  localparam int unsigned CW       = (RD_CYC > 1) ? $clog2(RD_CYC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_OUT-1:0]  spikes,
  output logic              rd_en,
  output logic [AW-1:0]     rd_addr,
  input  logic [WIDTH-1:0]  rd_data,
  output logic              pkt_valid,
  input  logic              pkt_ready,
  output logic [CORE_W-1:0] pkt_core,
  output logic [WLA_W-1:0]  pkt_wl,
  output logic              busy,
  output logic              done
);

  if (PER_LINE < 1) begin : g_bad_width
    $error("fanout_unit: a word line must hold the entries of one neuron");
  end
  if (BASE_WL + (N_OUT + PER_LINE - 1) / PER_LINE > WL) begin : g_bad_wl
    $error("fanout_unit: destination lines exceed the array");
  end

  typedef enum logic [1:0] {F_IDLE, F_READ, F_LOAD, F_SEND} fo_state_e;

  fo_state_e         state;
  logic [N_OUT-1:0]  pending;
  logic [IW-1:0]     n;         // lowest pending neuron
  logic [NEUR_W-1:0] entries;
  logic [EW-1:0]     e;
  logic [ENT_W-1:0]  cur;
  logic              cur_ok;
  logic [CW-1:0]     w;         // cycles waited for the array

  always_comb begin
    n = '0;
    for (int i = N_OUT - 1; i >= 0; i--) if (pending[i]) n = IW'(i);
  end

  assign cur       = entries[e * ENT_W +: ENT_W];
  assign cur_ok    = (cur[WLA_W-1:0] != '1);
  assign rd_en     = (state == F_READ);
  assign rd_addr   = AW'(BASE_WL + int'(n) / PER_LINE);
  assign pkt_valid = (state == F_SEND) && cur_ok;
  assign pkt_core  = cur[ENT_W-1:WLA_W];
  assign pkt_wl    = cur[WLA_W-1:0];
  assign busy      = (state != F_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= F_IDLE;
      pending <= '0;
      entries <= '0;
      e       <= '0;
      w       <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        F_IDLE: if (start) begin
          pending <= spikes;
          if (spikes == '0) done <= 1'b1;
          else              state <= F_READ;
        end
        F_READ: begin
          state <= F_LOAD;
          w     <= '0;
        end
        F_LOAD: if (w == CW'(RD_CYC - 1)) begin
          entries <= rd_data[(int'(n) % PER_LINE) * NEUR_W +: NEUR_W];
          e       <= '0;
          state   <= F_SEND;
        end else begin
          w <= w + 1'b1;
        end
        F_SEND: if (!cur_ok || pkt_ready) begin
          if (e == EW'(FANOUT - 1)) begin
            logic [N_OUT-1:0] left;
            left = pending & ~(N_OUT'(1) << n);
            pending <= left;
            if (left == '0) begin
              state <= F_IDLE;
              done  <= 1'b1;
            end else begin
              state <= F_READ;
            end
          end else begin
            e <= e + 1'b1;
          end
        end
        default: state <= F_IDLE;
      endcase
    end
  end

  a_pkt_stable: assert property (@(posedge clk) disable iff (!rst_n)
    pkt_valid && !pkt_ready |=> pkt_valid && $stable(pkt_core) && $stable(pkt_wl));

endmodule
