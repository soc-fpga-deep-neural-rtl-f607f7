// output_mux: serialises the PE results onto the single output stream.
//
// The N_PE PEs finish their output activations together (N_PE consecutive output
// channels of one x,y position). This block captures them and sends them one per
// beat, PE 0 first, on an 8-bit AXI-Stream, so the outputs leave in ZXY order and
// can be stored sequentially as the next layer's input. TLAST marks the final
// activation of the layer.
//
// Interface: `load` with `vals` and `last_grp` (the group is the layer's last);
// `load` is only accepted while `idle` is high. Timing: the first beat is offered
// the clock after `load`, then one beat per clock while tready is high.
// The capture register and the TLAST rule are this design's choices.
module output_mux
  import conv_pkg::*;
#(
  parameter int unsigned N_PE = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [ACT_W-1:0]    vals [N_PE],
  input  logic                last_grp,
  output logic                idle,
  output logic [ACT_W-1:0]    m_tdata,
  output logic                m_tvalid,
  input  logic                m_tready,
  output logic                m_tlast
);
  logic [ACT_W-1:0]            buf_q [N_PE];
  logic [$clog2(N_PE)-1:0]     idx;
  logic                        busy, last_q;

  always_comb begin
    idle     = !busy;
    m_tvalid = busy;
    m_tdata  = buf_q[idx];
    m_tlast  = busy && last_q && (32'(idx) == N_PE - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      idx    <= '0;
      last_q <= 1'b0;
      for (int i = 0; i < N_PE; i++) buf_q[i] <= '0;
    end else if (!busy) begin
      if (load) begin
        busy   <= 1'b1;
        idx    <= '0;
        last_q <= last_grp;
        buf_q  <= vals;
      end
    end else if (m_tready) begin
      if (32'(idx) == N_PE - 1) busy <= 1'b0;
      else                      idx  <= idx + 1'b1;
    end
  end

  // AXI-Stream rule: once offered, a beat stays unchanged until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata) && $stable(m_tlast);
  endproperty
  a_hold: assert property (p_hold) else $error("output stream changed while stalled");
endmodule
