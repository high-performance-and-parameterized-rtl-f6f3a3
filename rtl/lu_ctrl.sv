// lu_ctrl: control unit of the LU array (the control part of PE_0).
//
// Runs the n iterations k = 0..n-1 and, in each, the three stages:
//   Stage 1  reads a_{k,y}, y = k+1..n-1, from external memory and sends
//            them into the U chain as T_ROW_A tokens;
//   Stage 2  right behind them reads a_{x,k}, x = k..n-1, as T_COL_A tokens
//            (the source lets Stage 2 start as soon as the last element of
//            Stage 1 has entered); it then waits until PE_0 reports that
//            the last l_{x,k} has left the divider (s2_done);
//   Stage 3  starts PE_0's l stream (s3_go, with the spacing D) and waits
//            for s3_done before the next iteration begins, so a stage never
//            reads a partial sum that is still being updated.
// Iteration n-1 has no Stage 1 or 3; it only produces u_{n-1,n-1}.
//
// Every token is tagged with everything the PEs need, computed here by
// counters rather than by division: the owner PE of column y is
// ((y-1) mod P) + 1 and its local column c = (y-1) div P (column 0 is given
// to PE_P; in iteration 0 nothing is read from S1, so its slot is unused),
// and the S1 row base of row x is (x-1) * CMAX.  D, the largest number of
// Stage-1 elements any single PE received in this iteration, equals
// ceil((n-k-1)/P) and is counted as the elements are issued.
//
// Memory read port: a request (rd_req_valid/ready, row, col) is accepted
// when both are high; read data return in request order on rd_rsp_valid /
// rd_rsp_data after any latency, with at most TQ_D requests outstanding.
// The tags wait in a queue for their data.  The read port and the tagging
// scheme are this design's choices; the source states the order in which
// elements enter the array.
//
// Lint note: rst_n is both the asynchronous reset of the registers and the
// "disable iff" condition of the checking assertions at the end of the file,
// which is why a linter may report it as used synchronously and
// asynchronously; the assertions are not part of the circuit.
module lu_ctrl
  import lu_pkg::*;
#(
  parameter int unsigned P    = 17,
  parameter int unsigned NMAX = 1000,
  parameter int unsigned CMAX = (NMAX - 1 + P - 1) / P,
  parameter int unsigned TQ_D = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  idx_t n,
  output logic busy,
  output logic done,
  // external memory read port
  output logic rd_req_valid,
  input  logic rd_req_ready,
  output idx_t rd_req_row,
  output idx_t rd_req_col,
  input  logic rd_rsp_valid,
  input  fp_t  rd_rsp_data,
  // token stream into PE_0's inU
  output tok_t tok_out,
  // PE_0 handshake
  input  logic s2_done,
  input  logic s3_done,
  output logic s3_go,
  output idx_t s3_d,
  output logic s3_first
);

  localparam int unsigned TQ_AW = $clog2(TQ_D);

  typedef enum logic [2:0] {
    S_IDLE, S_ROW, S_COL, S_WAIT2, S_GO3, S_WAIT3
  } state_e;

  state_e state;
  idx_t   nn, k, idx, d_cnt;
  pe_id_t own_pe, cur_pe, first_pe;
  idx_t   own_c, cur_c;
  saddr_t rbase_k, xbase;

  // Owners of columns k+1 and k+2: one PE further along, wrapping from
  // PE_P to PE_1 and to the next local column.
  pe_id_t nxt1_pe, nxt2_pe;
  idx_t   nxt1_c, nxt2_c;
  always_comb begin
    if (own_pe == pe_id_t'(P)) begin
      nxt1_pe = pe_id_t'(1);
      nxt1_c  = own_c + idx_t'(1);
    end else begin
      nxt1_pe = own_pe + pe_id_t'(1);
      nxt1_c  = own_c;
    end
    if (nxt1_pe == pe_id_t'(P)) begin
      nxt2_pe = pe_id_t'(1);
      nxt2_c  = nxt1_c + idx_t'(1);
    end else begin
      nxt2_pe = nxt1_pe + pe_id_t'(1);
      nxt2_c  = nxt1_c;
    end
  end

  // ------------------------------------------------------------ tag queue
  tok_t             tq [TQ_D];
  logic [TQ_AW-1:0] tq_wp, tq_rp;
  logic [TQ_AW:0]   tq_n;
  logic             issue, push, pop;
  tok_t             tag_in;

  assign rd_req_valid = (state == S_ROW || state == S_COL) && (tq_n < (TQ_AW+1)'(TQ_D));
  assign issue        = rd_req_valid && rd_req_ready;
  assign push         = issue;
  assign pop          = rd_rsp_valid;

  always_comb begin
    tag_in = TOK_NONE;
    tag_in.first = (k == 0);
    if (state == S_ROW) begin
      tag_in.kind  = T_ROW_A;
      tag_in.pe    = cur_pe;
      tag_in.x     = k;
      tag_in.y     = idx;
      tag_in.c     = cur_c;
      tag_in.sbase = rbase_k;
    end else begin
      tag_in.kind  = T_COL_A;
      tag_in.last  = (idx == nn - idx_t'(1));
      tag_in.pe    = own_pe;
      tag_in.x     = idx;
      tag_in.y     = k;
      tag_in.c     = own_c;
      tag_in.sbase = xbase;
    end
    rd_req_row = tag_in.x;
    rd_req_col = tag_in.y;
  end

  always_ff @(posedge clk) begin
    if (push) tq[tq_wp] <= tag_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tq_wp   <= '0;
      tq_rp   <= '0;
      tq_n    <= '0;
      tok_out <= TOK_NONE;
    end else begin
      if (push) tq_wp <= tq_wp + 1'b1;
      if (pop)  tq_rp <= tq_rp + 1'b1;
      if (push && !pop)      tq_n <= tq_n + 1'b1;
      else if (pop && !push) tq_n <= tq_n - 1'b1;
      if (pop) begin
        tok_out      <= tq[tq_rp];
        tok_out.data <= rd_rsp_data;
      end else begin
        tok_out <= TOK_NONE;
      end
    end
  end

  // ------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      nn       <= '0;
      k        <= '0;
      idx      <= '0;
      d_cnt    <= '0;
      own_pe   <= '0;
      own_c    <= '0;
      cur_pe   <= '0;
      cur_c    <= '0;
      first_pe <= '0;
      rbase_k  <= '0;
      xbase    <= '0;
      s3_go    <= 1'b0;
      s3_d     <= '0;
      s3_first <= 1'b0;
      done     <= 1'b0;
    end else begin
      s3_go <= 1'b0;
      done  <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start && n != 0) begin
            nn      <= n;
            k       <= '0;
            // Column 0 belongs to PE_P; its local column is never used.
            own_pe  <= pe_id_t'(P);
            own_c   <= '1;
            rbase_k <= saddr_t'(-CMAX);
            // Stage 1 of iteration 0 starts at column 1: PE_1, c = 0.
            idx      <= idx_t'(1);
            cur_pe   <= pe_id_t'(1);
            cur_c    <= '0;
            first_pe <= pe_id_t'(1);
            d_cnt    <= '0;
                  xbase    <= saddr_t'(-CMAX);
            state    <= (n == idx_t'(1)) ? S_COL : S_ROW;
            if (n == idx_t'(1)) idx <= '0;
          end
        end
        S_ROW: begin
          if (issue) begin
            if (cur_pe == first_pe) d_cnt <= d_cnt + idx_t'(1);
            if (cur_pe == pe_id_t'(P)) begin
              cur_pe <= pe_id_t'(1);
              cur_c  <= cur_c + idx_t'(1);
            end else begin
              cur_pe <= cur_pe + pe_id_t'(1);
            end
            idx <= idx + idx_t'(1);
            if (idx == nn - idx_t'(1)) begin
              state <= S_COL;
              idx   <= k;
              xbase <= rbase_k;
            end
          end
        end
        S_COL: begin
          if (issue) begin
            idx   <= idx + idx_t'(1);
            xbase <= xbase + saddr_t'(CMAX);
            if (idx == nn - idx_t'(1)) state <= S_WAIT2;
          end
        end
        S_WAIT2: begin
          if (s2_done) begin
            if (k == nn - idx_t'(1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_GO3;
            end
          end
        end
        S_GO3: begin
          s3_go    <= 1'b1;
          s3_d     <= d_cnt;
          s3_first <= (k == 0);
          state    <= S_WAIT3;
        end
        S_WAIT3: begin
          if (s3_done) begin
            // Next iteration: column k+1 and its owner.
            k       <= k + idx_t'(1);
            rbase_k <= rbase_k + saddr_t'(CMAX);
            own_pe  <= nxt1_pe;
            own_c   <= nxt1_c;
            // Stage 1 of iteration k+1 starts at column k+2, owned by the
            // PE after the owner of column k+1.
            d_cnt <= '0;
            if (k + idx_t'(1) == nn - idx_t'(1)) begin
              state <= S_COL;
              idx   <= k + idx_t'(1);
              xbase <= rbase_k + saddr_t'(CMAX);
            end else begin
              state <= S_ROW;
              idx   <= k + idx_t'(2);
              cur_pe   <= nxt2_pe;
              first_pe <= nxt2_pe;
              cur_c    <= nxt2_c;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_tq_order: assert property (@(posedge clk) disable iff (!rst_n) !(pop && tq_n == 0 && !push));

endmodule
