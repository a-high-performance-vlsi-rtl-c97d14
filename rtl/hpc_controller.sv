// hpc_controller: timing generation and control of the clustering processor.
//
// A single state machine steps through the processing steps of one frame and
// produces the addresses, selects and write enables of every unit:
//   MINMAX  2*J+1 cycles: reads the frame memory twice (minimum pass, then
//           maximum pass); the Min-Max controls are delayed by one cycle to
//           line up with the registered memory read;
//   CS      N cycles: one dimension's cell size per cycle;
//   INDEX   J+1 cycles: reads each vector once, its bin indexes are written
//           into bank D one cycle after the address;
//   DENSITY J cycles: reference vector 0 .. J-1;
//   LINK    2*J-1 cycles: reference vector 0 .. J-2 (low to high), then
//           J-1 .. 0 (high to low);
//   DONE    1 cycle: `done` pulses, then the machine is idle again.
// A frame thus takes 6*J + N + 1 processing cycles, the architecture's
// 6*J + N - 1 steps plus one memory-read latency cycle in each of the two
// steps that read the frame memory. `start` is accepted only when idle.
module hpc_controller
  import hpc_pkg::*;
#(
  parameter int unsigned N = 22,
  parameter int unsigned J = 24882,
  localparam int unsigned AW = (J > 1) ? $clog2(J) : 1,
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned TW = $clog2(2*J + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output phase_e        phase,
  output logic          busy,
  output logic          done,
  // frame memory read address
  output logic [AW-1:0] mem_addr,
  // Min-Max step (aligned with the memory data)
  output logic          mm_valid,
  output logic          mm_first,
  output logic          mm_max,
  // cell-size step
  output logic          cs_we,
  output logic [KW-1:0] cs_k,
  // index step (aligned with the memory data)
  output logic          idx_we,
  output logic [AW-1:0] idx_addr,
  // density step
  output logic          den_we,
  output logic [AW-1:0] den_sel,
  // link step
  output logic          lnk_we,
  output logic [AW-1:0] lnk_sel
);

  logic [TW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      cnt      <= '0;
      mm_valid <= 1'b0;
      mm_first <= 1'b0;
      mm_max   <= 1'b0;
      idx_we   <= 1'b0;
      idx_addr <= '0;
    end else begin
      mm_valid <= 1'b0;
      mm_first <= 1'b0;
      idx_we   <= 1'b0;
      unique case (phase)
        PH_IDLE: begin
          cnt <= '0;
          if (start) phase <= PH_MINMAX;
        end
        PH_MINMAX: begin
          mm_valid <= (cnt < TW'(2*J));
          mm_first <= (cnt == '0) || (cnt == TW'(J));
          mm_max   <= (cnt >= TW'(J));
          if (cnt == TW'(2*J)) begin
            phase <= PH_CS;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PH_CS: begin
          if (cnt == TW'(N-1)) begin
            phase <= PH_INDEX;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PH_INDEX: begin
          idx_we   <= (cnt < TW'(J));
          idx_addr <= AW'(cnt);
          if (cnt == TW'(J)) begin
            phase <= PH_DENSITY;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PH_DENSITY: begin
          if (cnt == TW'(J-1)) begin
            phase <= PH_LINK;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PH_LINK: begin
          if (cnt == TW'(2*J-2)) begin
            phase <= PH_DONE;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: begin  // PH_DONE
          phase <= PH_IDLE;
          cnt   <= '0;
        end
      endcase
    end
  end

  always_comb begin
    busy     = (phase != PH_IDLE);
    done     = (phase == PH_DONE);
    mem_addr = '0;
    if (phase == PH_MINMAX)
      mem_addr = (cnt < TW'(J)) ? AW'(cnt) : AW'(cnt - TW'(J));
    else if (phase == PH_INDEX)
      mem_addr = AW'(cnt);
    cs_we   = (phase == PH_CS);
    cs_k    = KW'(cnt);
    den_we  = (phase == PH_DENSITY);
    den_sel = AW'(cnt);
    lnk_we  = (phase == PH_LINK);
    lnk_sel = (cnt < TW'(J-1)) ? AW'(cnt) : AW'(TW'(2*J-2) - cnt);
  end

endmodule
