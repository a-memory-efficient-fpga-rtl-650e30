// Decoding schedule controller.
//
// Sequences one codeword through the decoding steps:
//   PH_LOAD  accept P input words (T channel values each) through a
//            valid/ready handshake;
//   PH_VN    P read cycles plus one drain cycle: variable node processing
//            of every column, with the check nodes of the first block row
//            processed on the fly;
//   PH_CN    P read cycles plus one drain cycle: check node processing of
//            block rows 2..C;
//   then either another PH_VN (next iteration) or
//   PH_OUT   P read cycles plus one cycle: the decoded codeword is output.
// The phase cycle counter k runs 0..P; reads are issued for k < P. One
// iteration therefore takes 2P+2 cycles.
//
// Termination: syn_in is the per-row parity of the hard decisions (1 = a
// check is not satisfied), delivered during PH_VN (first block row) and
// PH_CN (other block rows). The controller ORs it into a flag cleared at
// the start of each iteration; at the end of PH_CN it stops when all checks
// held (converged) or when MAX_ITER iterations are done.
//
// load/load_phase tell the address generators to take the start row of the
// phase that begins in the next cycle. first_iter is high during the first
// iteration, when the check-to-variable memories hold no messages yet.
// The steps and the stopping rule follow the design; the cycle-level
// sequencing, the drain cycles and the handshake are this implementation's
// choices.
module ldpc_ctrl #(
  parameter int unsigned P        = 256,
  parameter int unsigned MAX_ITER = 15,
  parameter int unsigned K_W      = $clog2(P + 1),
  parameter int unsigned IT_W     = $clog2(MAX_ITER + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // input handshake
  input  logic                in_valid,
  output logic                in_ready,
  // parity of checked rows, 1 = unsatisfied
  input  logic                syn_in,
  // schedule
  output ldpc_pkg::phase_t    phase,
  output logic [K_W-1:0]      k,
  output logic                rd_en,
  output logic                first_iter,
  output logic                load,
  output ldpc_pkg::phase_t    load_phase,
  // status
  output logic [IT_W-1:0]     iter,
  output logic                converged,
  output logic                done
);
  import ldpc_pkg::*;

  logic syn_acc;
  logic last_k;
  logic fail;

  assign last_k   = (k == K_W'(P));
  assign rd_en    = (phase != PH_LOAD) && (k < K_W'(P));
  assign in_ready = (phase == PH_LOAD);
  assign fail     = syn_acc | syn_in;
  assign first_iter = (iter == IT_W'(1));

  always_comb begin
    load       = 1'b0;
    load_phase = PH_LOAD;
    unique case (phase)
      PH_LOAD: if (in_valid && k == K_W'(P - 1)) begin
        load = 1'b1; load_phase = PH_VN;
      end
      PH_VN:   if (last_k) begin
        load = 1'b1; load_phase = PH_CN;
      end
      PH_CN:   if (last_k) begin
        load = 1'b1;
        load_phase = (!fail || iter == IT_W'(MAX_ITER)) ? PH_OUT : PH_VN;
      end
      PH_OUT:  if (last_k) begin
        load = 1'b1; load_phase = PH_LOAD;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_LOAD;
      k         <= '0;
      iter      <= '0;
      syn_acc   <= 1'b0;
      converged <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (phase == PH_VN || phase == PH_CN)
        syn_acc <= syn_acc | syn_in;
      if (phase == PH_LOAD) begin
        if (in_valid) k <= k + K_W'(1);
      end else begin
        k <= k + K_W'(1);
      end
      if (load) begin
        phase <= load_phase;
        k     <= '0;
        unique case (load_phase)
          PH_VN: begin
            iter    <= iter + IT_W'(1);
            syn_acc <= 1'b0;
          end
          PH_OUT:  converged <= !fail;
          PH_LOAD: begin
            done <= 1'b1;
            iter <= '0;
          end
          default: ;
        endcase
      end
    end
  end

  a_iter_range: assert property (@(posedge clk)
    iter <= IT_W'(MAX_ITER))
    else $error("ldpc_ctrl: iteration count out of range");
endmodule
