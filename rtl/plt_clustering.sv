// plt_clustering: clusters the raw Y/U/V pixels of an 8x8 CU into at most
// MAX_CLUSTERS colours and streams out the cluster centres (palette
// clustering stage, ahead of the CU coders and outside the feedback loop).
//
// Pass 1 (one pixel per input cycle, NPIX pixels): each pixel is compared
// (Y/U/V SAD) with the leader colour of every open cluster; it joins the
// nearest one if that SAD is within err_margin, otherwise it opens a new
// cluster with itself as leader (or joins the nearest when all clusters are
// open). The pixels are kept.
// Means: one cluster per cycle, centre = per-component sum / count.
// Pass 2, refinement (one stored pixel per cycle): every pixel is assigned
// to the nearest centre and the sums are rebuilt.
// Output: one refined centre per cycle on out_valid, out_last on the final
// one; done follows. The error margin comes in on a port.
module plt_clustering
  import scc_pkg::*;
#(
  parameter int NPIX         = 64,
  parameter int MAX_CLUSTERS = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [9:0] err_margin,
  input  logic       pix_valid,
  input  yuv_t       pix,
  output logic       busy,
  output logic       out_valid,
  output yuv_t       out_c,
  output logic       out_last,
  output logic       done,
  output logic [6:0] n_clusters
);
  localparam int CW = $clog2(MAX_CLUSTERS);
  localparam int PW = $clog2(NPIX);
  localparam int SUMW = PIX_W + PW + 1;

  typedef enum logic [2:0] {S_IDLE, S_LEAD, S_MEAN1, S_REFINE, S_MEAN2, S_OUT} state_t;
  state_t state;

  yuv_t       pixels [NPIX];
  yuv_t       lead [MAX_CLUSTERS];
  logic [SUMW-1:0] sy [MAX_CLUSTERS], su [MAX_CLUSTERS], sv [MAX_CLUSTERS];
  logic [PW:0] cnt [MAX_CLUSTERS];
  logic [PW:0] pcount;
  logic [CW:0] k;
  yuv_t       probe;
  logic [CW-1:0] near_idx;
  logic [9:0] near_cost;

  // nearest open cluster to the probe colour
  always_comb begin
    probe     = (state == S_LEAD) ? pix : pixels[pcount[PW-1:0]];
    near_idx  = '0;
    near_cost = 10'h3FF;
    for (int i = 0; i < MAX_CLUSTERS; i++)
      if (7'(i) < n_clusters && yuv_sad(probe, lead[i]) < near_cost) begin
        near_cost = yuv_sad(probe, lead[i]);
        near_idx  = CW'(i);
      end
  end

  function automatic yuv_t mean_of(input int i);
    yuv_t m;
    m.y = PIX_W'(sy[i] / SUMW'(cnt[i]));
    m.u = PIX_W'(su[i] / SUMW'(cnt[i]));
    m.v = PIX_W'(sv[i] / SUMW'(cnt[i]));
    return m;
  endfunction

  assign busy = state != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pcount     <= '0;
      k          <= '0;
      n_clusters <= '0;
      out_valid  <= 1'b0;
      out_last   <= 1'b0;
      out_c      <= '0;
      done       <= 1'b0;
      for (int i = 0; i < NPIX; i++) pixels[i] <= '0;
      for (int i = 0; i < MAX_CLUSTERS; i++) begin
        lead[i] <= '0; sy[i] <= '0; su[i] <= '0; sv[i] <= '0; cnt[i] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          pcount     <= '0;
          n_clusters <= '0;
          for (int i = 0; i < MAX_CLUSTERS; i++) begin
            sy[i] <= '0; su[i] <= '0; sv[i] <= '0; cnt[i] <= '0;
          end
          state <= S_LEAD;
        end
        S_LEAD: if (pix_valid) begin
          pixels[pcount[PW-1:0]] <= pix;
          if ((n_clusters == '0 || near_cost > err_margin) && n_clusters < 7'(MAX_CLUSTERS)) begin
            lead[n_clusters[CW-1:0]] <= pix;
            sy[n_clusters[CW-1:0]]   <= SUMW'(pix.y);
            su[n_clusters[CW-1:0]]   <= SUMW'(pix.u);
            sv[n_clusters[CW-1:0]]   <= SUMW'(pix.v);
            cnt[n_clusters[CW-1:0]]  <= 1;
            n_clusters <= n_clusters + 1'b1;
          end else begin
            sy[near_idx]  <= sy[near_idx] + SUMW'(pix.y);
            su[near_idx]  <= su[near_idx] + SUMW'(pix.u);
            sv[near_idx]  <= sv[near_idx] + SUMW'(pix.v);
            cnt[near_idx] <= cnt[near_idx] + 1'b1;
          end
          pcount <= pcount + 1'b1;
          if (pcount == (PW+1)'(NPIX - 1)) begin
            k     <= '0;
            state <= S_MEAN1;
          end
        end
        S_MEAN1: begin
          // leaders become the means; sums restart for the refinement pass
          lead[k[CW-1:0]] <= mean_of(int'(k[CW-1:0]));
          sy[k[CW-1:0]] <= '0; su[k[CW-1:0]] <= '0; sv[k[CW-1:0]] <= '0; cnt[k[CW-1:0]] <= '0;
          k <= k + 1'b1;
          if (k + 1'b1 >= (CW+1)'(n_clusters)) begin
            pcount <= '0;
            state  <= S_REFINE;
          end
        end
        S_REFINE: begin
          sy[near_idx]  <= sy[near_idx] + SUMW'(probe.y);
          su[near_idx]  <= su[near_idx] + SUMW'(probe.u);
          sv[near_idx]  <= sv[near_idx] + SUMW'(probe.v);
          cnt[near_idx] <= cnt[near_idx] + 1'b1;
          pcount <= pcount + 1'b1;
          if (pcount == (PW+1)'(NPIX - 1)) begin
            k     <= '0;
            state <= S_OUT;
          end
        end
        S_OUT: begin
          // an emptied cluster keeps its previous centre
          out_valid <= 1'b1;
          out_c     <= (cnt[k[CW-1:0]] != '0) ? mean_of(int'(k[CW-1:0])) : lead[k[CW-1:0]];
          out_last  <= k + 1'b1 >= (CW+1)'(n_clusters);
          k <= k + 1'b1;
          if (k + 1'b1 >= (CW+1)'(n_clusters)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
