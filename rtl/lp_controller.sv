// lp_controller: sequencer of the LP core for one input coordinate.
//
// On start it latches the command (cmd_t) and processes the activations
// held in the activation buffer in rounds:
//   RESTART  rewind the buffer's lane pointers                      1 cycle
//   FETCH    every lane takes its next non-blocked activation       1 cycle
//   A0..A2   LUT update of all LPEs                                  3 cycles
//   B        one weight read per cycle, looping over output group,
//            kernel row, kernel column and weight bit (LSB first)   cog*kh*kw*nb
// After the last B cycle it fetches again if the buffer has more kept
// activations, otherwise it waits DRAIN cycles for the pipeline
// (WMEM read, cluster, shifter, accumulation) and pulses done.
// A coordinate whose activations are all blocked costs no A- or B-cycle.
//
// Every B cycle drives the WMEM offset (a counter over the loop) and a tag
// for the pipeline: first/last bit plane, bit position, whether the plane
// is a negative MSB, and the OMEM address
//   obase + cog*cstride + ky*rstride + kx.
// The A-step/B-step order, the 3-cycle A-step and the kernel-size loop
// follow the document; the FETCH and DRAIN cycles, the command format and
// the address formula are this design's choices.
module lp_controller
  import lp_pkg::*;
#(
  parameter int unsigned DRAIN = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  cmd_t        cmd_in,
  output cmd_t        cmd,        // latched command
  output logic        busy,
  output logic        done,
  // activation buffer
  output logic        ab_restart,
  output logic        ab_fetch,
  input  logic        ab_more,
  // clusters
  output logic        a_valid,
  output logic [1:0]  a_cyc,
  // weight read
  output logic        w_rd,
  output logic [15:0] w_offset,
  output btag_t       tag,
  // statistics
  output logic [15:0] round_count
);

  typedef enum logic [2:0] {S_IDLE, S_RESTART, S_CHECK, S_FETCH, S_A, S_B, S_DRAIN} state_e;

  state_e      state;
  logic [1:0]  acyc;
  logic [7:0]  cog;
  logic [3:0]  ky, kx, bitp;
  logic [15:0] offset;
  logic [7:0]  drain_cnt;
  logic        b_last;

  assign busy       = state != S_IDLE;
  assign ab_restart = state == S_RESTART;
  assign ab_fetch   = state == S_FETCH;
  assign a_valid    = state == S_A;
  assign a_cyc      = acyc;
  assign w_rd       = state == S_B;
  assign w_offset   = offset;

  assign b_last = (32'(bitp) == 32'(cmd.nb) - 1) && (kx == cmd.kw - 4'd1)
               && (ky == cmd.kh - 4'd1) && (cog == cmd.cog_count - 8'd1);

  always_comb begin
    tag         = '0;
    tag.valid   = state == S_B;
    tag.first   = bitp == 4'd0;
    tag.last    = 32'(bitp) == 32'(cmd.nb) - 1;
    tag.bitpos  = bitp;
    tag.msb_neg = !cmd.mode_1b && tag.last;
    tag.oaddr   = cmd.obase + 16'(cog) * cmd.cstride + 16'(ky) * cmd.rstride + 16'(kx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cmd         <= '0;
      acyc        <= '0;
      cog         <= '0;
      ky          <= '0;
      kx          <= '0;
      bitp        <= '0;
      offset      <= '0;
      drain_cnt   <= '0;
      done        <= 1'b0;
      round_count <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cmd   <= cmd_in;
          state <= S_RESTART;
        end
        S_RESTART: state <= S_CHECK;
        S_CHECK: begin
          drain_cnt <= '0;
          state     <= ab_more ? S_FETCH : S_DRAIN;
        end
        S_FETCH: begin
          acyc        <= '0;
          round_count <= round_count + 1'b1;
          state       <= S_A;
        end
        S_A: begin
          acyc <= acyc + 2'd1;
          if (acyc == 2'd2) begin
            state  <= S_B;
            cog    <= '0;
            ky     <= '0;
            kx     <= '0;
            bitp   <= '0;
            offset <= '0;
          end
        end
        S_B: begin
          offset <= offset + 16'd1;
          if (32'(bitp) != 32'(cmd.nb) - 1) bitp <= bitp + 4'd1;
          else begin
            bitp <= '0;
            if (kx != cmd.kw - 4'd1) kx <= kx + 4'd1;
            else begin
              kx <= '0;
              if (ky != cmd.kh - 4'd1) ky <= ky + 4'd1;
              else begin
                ky  <= '0;
                cog <= cog + 8'd1;
              end
            end
          end
          if (b_last) begin
            drain_cnt <= '0;
            state     <= ab_more ? S_FETCH : S_DRAIN;
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 8'd1;
          if (32'(drain_cnt) == DRAIN - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a command is accepted only when idle, and its sizes must be non-zero
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("start while busy is ignored");
  a_cmd_sizes: assert property (@(posedge clk) disable iff (!rst_n)
      (start && !busy) |-> (cmd_in.nb != 0 && cmd_in.kw != 0 && cmd_in.kh != 0 && cmd_in.cog_count != 0))
    else $error("command with a zero loop size");

endmodule
