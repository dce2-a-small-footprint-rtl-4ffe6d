// dce2_pattern_gen: test pattern generator in front of the DCE2 core on the test chip.
//
// Produces the 64-channel row stream the core sees, from one of two sources chosen by the control
// word:
//   pattern memory  rows 0..last of the pattern memory are replayed, one row every RATIO clocks
//                   (the row clock), numbered by their memory index.  Without loop the pass ends
//                   with one empty row numbered last+2, which completes every open cluster, and
//                   the generator stops (done).  With loop the rows repeat; the jump of the row
//                   number back to 0 completes the clusters of each pass.
//   8-channel input the eight input channels of each strobe are copied into every group of eight
//                   core channels whose grp_en bit is set; strobe and row number pass through.
// A pass starts on the rising edge of ctrl.run.  Outputs are registered.  The two sources follow
// the document's figure (8ch input, pattern memory, pattern generator, 64 channels); the copy
// rule, the timing and the end-of-pass flush row are this design's own.
module dce2_pattern_gen
  import dce2_pkg::*;
  import dce2_jtag_pkg::*;
#(
  parameter int unsigned RATIO = dce2_pkg::ROW_CLK_RATIO
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  ctrl_t                    ctrl,
  // 8-channel input
  input  logic                     ext_stb,
  input  logic [ROWW-1:0]          ext_row,
  input  logic [7:0][ADCW-1:0]     ext_adc,
  // pattern memory read port (one clock latency)
  output logic [PAT_AW-1:0]        pm_addr,
  input  logic [NCH*ADCW-1:0]      pm_data,
  // rows to the core
  output logic                     row_stb,
  output logic [ROWW-1:0]          row_num,
  output logic [NCH-1:0][ADCW-1:0] row_adc,
  output logic                     busy,
  output logic                     done
);
  localparam int unsigned TW = $clog2(RATIO);

  logic              run_q;
  logic [TW-1:0]     tmr;
  logic [PAT_AW-1:0] idx;
  logic              flush;

  assign pm_addr = idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      tmr     <= '0;
      idx     <= '0;
      flush   <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
      row_stb <= 1'b0;
      row_num <= '0;
      row_adc <= '0;
    end else begin
      run_q   <= ctrl.run;
      row_stb <= 1'b0;
      if (!ctrl.run) begin
        busy <= 1'b0;
      end else if (!ctrl.src_mem) begin
        // 8-channel input, copied into the enabled groups
        row_stb <= ext_stb;
        if (ext_stb) begin
          row_num <= ext_row;
          for (int g = 0; g < NCH / 8; g++)
            for (int i = 0; i < 8; i++)
              row_adc[8 * g + i] <= ctrl.grp_en[g % 8] ? ext_adc[i] : '0;
        end
      end else if (!run_q) begin
        // rising edge of run: start a pass
        busy  <= 1'b1;
        done  <= 1'b0;
        idx   <= '0;
        tmr   <= '0;
        flush <= 1'b0;
      end else if (busy) begin
        tmr <= (tmr == TW'(RATIO - 1)) ? '0 : tmr + 1'b1;
        if (tmr == TW'(1)) begin
          row_stb <= 1'b1;
          if (flush) begin
            row_num <= ROWW'(ctrl.last) + ROWW'(2);
            row_adc <= '0;
            busy    <= 1'b0;
            done    <= 1'b1;
          end else begin
            row_num <= ROWW'(idx);
            row_adc <= pm_data;
            if (idx == ctrl.last) begin
              idx   <= '0;
              flush <= !ctrl.loop;
            end else begin
              idx <= idx + 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
