// ap: global average pooling unit of the DSCNN back end.
//
// For each of cfg.in_c channels it reads the cfg.out_h*cfg.out_w activations
// of that channel (channel-major layout, base cfg.in_base), sums them,
// multiplies the sum by cfg.scale and shifts right by cfg.shift (scale is
// the reciprocal 2^shift / positions, prepared by the controller), clips to
// [0,255] and writes the mean to cfg.out_base + channel.  One read request
// per cycle while the port is granted; read data arrive one cycle after the
// grant (rvalid).  The mean is written before the next channel starts.
//
// The description gives the unit's function and its separate read /
// write-back connection to the activation SRAM; the reciprocal-multiply
// mean and the sequencing are this design's choices.
module ap
  import kws_pkg::*;
#(
  parameter int ACT_AW = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  layer_cfg_t        cfg,
  output logic              busy,
  output logic              done,
  output logic              req,
  output logic              we,
  output logic [ACT_AW-1:0] addr,
  output logic [7:0]        wdata,
  input  logic              gnt,
  input  logic              rvalid,
  input  logic [7:0]        rdata
);
  layer_cfg_t  c;
  logic [15:0] npos, issued, got;
  logic [7:0]  ch;
  logic [23:0] sum;
  logic        wr_ph;
  logic [47:0] mean;

  assign mean  = (48'(sum) * 48'(c.scale)) >> c.shift;
  assign req   = busy && (wr_ph || issued != npos);
  assign we    = wr_ph;
  assign addr  = wr_ph ? ACT_AW'(int'(c.out_base) + int'(ch))
                       : ACT_AW'(int'(c.in_base) + int'(ch) * int'(npos) + int'(issued));
  assign wdata = (mean > 48'd255) ? 8'd255 : mean[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0; npos <= '0; issued <= '0; got <= '0; ch <= '0; sum <= '0;
      wr_ph <= 1'b0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        c      <= cfg;
        npos   <= 16'(cfg.out_h) * 16'(cfg.out_w);
        issued <= '0;
        got    <= '0;
        ch     <= '0;
        sum    <= '0;
        wr_ph  <= 1'b0;
        busy   <= 1'b1;
      end else if (busy) begin
        if (!wr_ph) begin
          if (req && gnt) issued <= issued + 1'b1;
          if (rvalid) begin
            sum <= sum + 24'(rdata);
            got <= got + 1'b1;
            if (got + 1'b1 == npos) wr_ph <= 1'b1;
          end
        end else if (gnt) begin
          wr_ph  <= 1'b0;
          sum    <= '0;
          issued <= '0;
          got    <= '0;
          if (ch == c.in_c - 1'b1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            ch <= ch + 1'b1;
          end
        end
      end
    end
  end
endmodule
