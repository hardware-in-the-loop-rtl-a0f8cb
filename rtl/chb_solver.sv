// One simulation step of the cellular H-bridge (CHB) inverter: three motor
// phases, each with N_CPP cells in series, every cell made of a three-phase
// diode rectifier, a DC-link capacitor and an H-bridge, driving a star-
// connected motor with leakage inductance and back EMF.
//
// The step is computed by a small sequencer that shares one rectifier unit and
// one inverter unit among all cells, as a high-level-synthesis tool shares the
// arithmetic of repeated function calls:
//   cycles 1..N_CELLS  cell c: rectifier and H-bridge update of cell c
//   next cycle         neutral voltage vn = (sum vph - sum emf) / 3
//   next N_PH cycles   motor phase p: im += k_lm * (vph - vn - emf)
// then `done` pulses for one cycle, N_CELLS + N_PH + 2 cycles after `go`
// (11 cycles for 3 x 2 cells). Every update uses the state of the previous step
// (explicit Euler). Cell c belongs to phase c / N_CPP. The electrical state
// (DC currents, DC-link voltages, motor currents) is held here and cleared by
// reset or `clear`; the DC links start at VDC_INIT (1500 V, the
// average DC-link voltage of the simulated converter), the currents at zero. `rec` presents the record of
// the last finished step: step count, motor currents, phase voltages, U-V line
// voltage and, per cell, vdc, vout, idc and the three input currents. The
// inputs must stay stable while the step runs. The partitioning into cells and
// phases follows the design; the equations and the schedule are this design's
// own.
module chb_solver
  import hil_pkg::*;
#(
  parameter q_t VDC_INIT = 32'sd98304000   // 1500 V
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    go,
  input  logic    clear,
  input  chb_in_t inp,
  output logic    busy,
  output logic    done,
  output q_t      rec [REC_WORDS]
);

  localparam int unsigned CW = $clog2(N_CELLS + 1);

  typedef enum logic [1:0] {S_IDLE, S_CELL, S_NEUT, S_MOTOR} sstate_e;
  sstate_e        st;
  logic [CW-1:0]  idx;

  // state
  q_t idc [N_CELLS];
  q_t vdc [N_CELLS];
  q_t im  [N_PH];
  // per-step results
  q_t vout [N_CELLS];
  q_t ig   [N_CELLS][3];
  q_t vn;
  q_t vph  [N_PH];
  logic [31:0] steps;

  // ---------------------------------------------------------------- shared units
  q_t vg_a [3];
  q_t r_idc_next, i_vout, i_vdc_next;
  q_t r_ig [3];
  q_t cell_vdc, cell_idc, cell_iph;
  sw_t cell_sw;

  always_comb begin
    for (int p = 0; p < 3; p++) vg_a[p] = inp.vg[p];
    cell_vdc = '0;
    cell_idc = '0;
    cell_iph = '0;
    cell_sw  = '0;
    for (int c = 0; c < N_CELLS; c++) begin
      if (idx == CW'(c)) begin
        cell_vdc = vdc[c];
        cell_idc = idc[c];
        cell_iph = im[c / N_CPP];
        cell_sw  = inp.sw[c];
      end
    end
  end

  chb_rectifier u_rect (
    .vg(vg_a), .vdc(cell_vdc), .idc(cell_idc), .k_lt(inp.k_lt),
    .idc_next(r_idc_next), .ig(r_ig)
  );

  chb_inverter u_inv (
    .sw(cell_sw), .vdc(cell_vdc), .idc(cell_idc), .iph(cell_iph), .k_c(inp.k_c),
    .vout(i_vout), .vdc_next(i_vdc_next)
  );

  // phase voltages from the cell outputs of this step
  always_comb begin
    for (int p = 0; p < N_PH; p++) begin
      vph[p] = '0;
      for (int k = 0; k < N_CPP; k++) vph[p] = q_add(vph[p], vout[p * N_CPP + k]);
    end
  end

  q_t sum_v, sum_e, vn_next;
  always_comb begin
    sum_v = '0;
    sum_e = '0;
    for (int p = 0; p < N_PH; p++) begin
      sum_v = q_add(sum_v, vph[p]);
      sum_e = q_add(sum_e, inp.emf[p]);
    end
    vn_next = q_mul(Q_THIRD, q_sub(sum_v, sum_e));
  end

  // motor unit, shared by the phases
  q_t m_vph, m_emf, m_im, m_im_next;
  always_comb begin
    m_vph = '0;
    m_emf = '0;
    m_im  = '0;
    for (int p = 0; p < N_PH; p++) begin
      if (idx == CW'(p)) begin
        m_vph = vph[p];
        m_emf = inp.emf[p];
        m_im  = im[p];
      end
    end
    m_im_next = q_add(m_im, q_mul(inp.k_lm, q_sub(q_sub(m_vph, vn), m_emf)));
  end

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      st    <= S_IDLE;
      idx   <= '0;
      done  <= 1'b0;
      steps <= '0;
      vn    <= '0;
      for (int c = 0; c < N_CELLS; c++) begin
        idc[c]  <= '0;
        vdc[c]  <= VDC_INIT;
        vout[c] <= '0;
        for (int p = 0; p < 3; p++) ig[c][p] <= '0;
      end
      for (int p = 0; p < N_PH; p++) im[p] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (go) begin
          st  <= S_CELL;
          idx <= '0;
        end
        S_CELL: begin
          for (int c = 0; c < N_CELLS; c++) begin
            if (idx == CW'(c)) begin
              idc[c]  <= r_idc_next;
              vdc[c]  <= i_vdc_next;
              vout[c] <= i_vout;
              for (int p = 0; p < 3; p++) ig[c][p] <= r_ig[p];
            end
          end
          if (idx == CW'(N_CELLS - 1)) st <= S_NEUT;
          idx <= (idx == CW'(N_CELLS - 1)) ? '0 : idx + 1'b1;
        end
        S_NEUT: begin
          vn <= vn_next;
          st <= S_MOTOR;
        end
        S_MOTOR: begin
          for (int p = 0; p < N_PH; p++)
            if (idx == CW'(p)) im[p] <= m_im_next;
          if (idx == CW'(N_PH - 1)) begin
            st    <= S_IDLE;
            idx   <= '0;
            done  <= 1'b1;
            steps <= steps + 32'd1;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  // ---------------------------------------------------------------- record
  always_comb begin
    rec[REC_STEP] = q_t'(steps);
    for (int p = 0; p < N_PH; p++) begin
      rec[REC_IM + p]  = im[p];
      rec[REC_VPH + p] = vph[p];
    end
    rec[REC_VUV] = q_sub(vph[0], vph[1]);
    for (int c = 0; c < N_CELLS; c++) begin
      rec[REC_CELL + REC_PER_CELL * c + 0] = vdc[c];
      rec[REC_CELL + REC_PER_CELL * c + 1] = vout[c];
      rec[REC_CELL + REC_PER_CELL * c + 2] = idc[c];
      rec[REC_CELL + REC_PER_CELL * c + 3] = ig[c][0];
      rec[REC_CELL + REC_PER_CELL * c + 4] = ig[c][1];
      rec[REC_CELL + REC_PER_CELL * c + 5] = ig[c][2];
    end
  end

  a_go_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    go |-> st == S_IDLE);

endmodule
