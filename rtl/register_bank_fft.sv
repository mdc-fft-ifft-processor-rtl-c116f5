// register_bank_fft: 64-point radix-4 DIT FFT/IFFT computed in place by one
// butterfly processor that works back and forth between two register banks.
//
// Structure: Mem In loads a symbol into Register Bank 1 (ChooseMemReg picks
// Mem In or the butterfly results as the bank's write source). Four read
// selects RS1..RS4 pick the butterfly's four inputs out of a bank, and the
// Input Register Select picks which bank feeds the butterfly processor. The
// butterfly results are written back, one clock later, to the other bank at
// the read addresses delayed to match (DDD_RS1 for bank 1, DDD_RS2 for
// bank 2). Mem Out reads Register Bank 2.
// Schedule: rank 1 reads bank 1 and writes bank 2, rank 2 reads bank 2 and
// writes bank 1, rank 3 reads bank 1 and writes bank 2. Each rank issues 16
// butterflies on 16 clocks and one more clock lets the last result land, so
// a transform takes 3 * 17 = 51 clocks. With n = 16*n2 + 4*n1 + n0 and
// k = 16*k2 + 4*k1 + k0, butterfly b of a rank reads input l at
//   rank 1: 16*l + b                (b = 4*n1 + n0, twiddle exponent 0)
//   rank 2: 16*b[3:2] + 4*l + b[1:0] (b = 4*k0 + n0, exponent 4*k0)
//   rank 3: 16*b[3:2] + 4*b[1:0] + l (b = 4*k0 + k1, exponent 4*k1 + k0)
// and writes its output p where input p came from (in place). After rank 3
// bank 2 holds X(16*k2 + 4*k1 + k0) at address 16*k0 + 4*k1 + k2, so Mem
// Out reads the bank in digit-reversed order to give natural order.
// Interface: samples x(0) .. x(63) are accepted on in_valid && in_ready, in
// order, one per clock at most, with gaps allowed. inverse and scale are
// taken with x(0), as in fft64_mdc (scale: 2-bit right shift per rank).
// in_ready is low while the full bank waits and during the transform.
// X(0) .. X(63) then leave on out_data with out_valid and out_index, one per
// clock, X(0) 54 clocks after the clock that delivered x(63). Loading the
// next symbol may overlap the readout; its transform starts when the
// readout has finished, so symbols can follow every 116 clocks.
// Word format {re[31:16], im[15:0]}.
// Memory: two banks of 64 words. reset is synchronous, active high.
// The two register banks, the muxes around them and their signal names
// follow the document's figure of the processor's internal architecture;
// the read and write order, the control sequence and the handshake are this
// design's own.
module register_bank_fft
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       in_valid,
  output logic       in_ready,
  input  cplx_t      in_data,
  input  logic       inverse,
  input  logic [5:0] scale,
  output logic       out_valid,
  output logic [5:0] out_index,
  output cplx_t      out_data
);

  cplx_t bank1 [N];
  cplx_t bank2 [N];

  // ---- load (Mem In) ----
  logic [6:0] ld_cnt;      // samples in bank 1, 64 = full
  mode_t      mode_ld;     // mode of the symbol being loaded
  logic       full;
  logic       load;
  assign full     = ld_cnt[6];
  assign load     = in_valid && in_ready;

  // ---- transform control ----
  logic       comp;        // transform running
  logic [1:0] rank;        // 0..2 for ranks 1..3
  logic [4:0] bcnt;        // butterfly count in the rank, 16 = flush clock
  logic [3:0] b;
  mode_t      mode_c;
  logic       issue;
  logic       start;
  logic       out_busy;
  logic [5:0] ocnt;

  assign in_ready = !full && !comp;
  assign start    = full && !comp && !out_busy;
  assign b        = bcnt[3:0];
  assign issue    = comp && !bcnt[4];

  // read selects RS1..RS4 (bank addresses of the four butterfly inputs)
  logic [5:0] rs [4];
  logic [5:0] e;
  always_comb begin
    for (int l = 0; l < 4; l++) begin
      unique case (rank)
        2'd0:    rs[l] = {2'(l), b};
        2'd1:    rs[l] = {b[3:2], 2'(l), b[1:0]};
        default: rs[l] = {b, 2'(l)};
      endcase
    end
    // twiddle exponent in units of W_64: rank 2 uses 4*k0, rank 3 4*k1 + k0
    unique case (rank)
      2'd0:    e = 6'd0;
      2'd1:    e = {2'b00, b[3:2], 2'b00};
      default: e = {2'b00, b[1:0], b[3:2]};
    endcase
  end

  // Input Register Select: rank 2 reads bank 2, ranks 1 and 3 read bank 1
  logic  input_reg_sel;
  cplx_t rd [4];
  assign input_reg_sel = (rank == 2'd1);
  always_comb
    for (int l = 0; l < 4; l++) rd[l] = input_reg_sel ? bank2[rs[l]] : bank1[rs[l]];

  logic [1:0] shift;
  assign shift = (rank == 2'd0) ? mode_c.scale[1:0] :
                 (rank == 2'd1) ? mode_c.scale[3:2] : mode_c.scale[5:4];

  logic [31:0] wd [4];
  bfly_processor u_bfp (
    .clk(clk), .reset(reset),
    .bfpcontrol({shift, mode_c.inverse, e}),
    .read_data_a(rd[0]), .read_data_b(rd[1]), .read_data_c(rd[2]), .read_data_d(rd[3]),
    .write_data_a(wd[0]), .write_data_b(wd[1]), .write_data_c(wd[2]), .write_data_d(wd[3])
  );

  // write addresses: the read selects delayed by the processor's latency
  logic [5:0] ddd_rs [4];
  logic       wr_en, wr_bank1;
  always_ff @(posedge clk) begin
    ddd_rs   <= rs;
    wr_en    <= issue;
    wr_bank1 <= input_reg_sel;   // results go to the bank not read
  end

  // ChooseMemReg: bank 1 is written by Mem In while loading, by the
  // butterfly processor during rank 2 (never both: in_ready is low then)
  logic choose_mem_reg;
  assign choose_mem_reg = wr_en && wr_bank1;

  always_ff @(posedge clk) begin
    if (choose_mem_reg) begin
      for (int p = 0; p < 4; p++) bank1[ddd_rs[p]] <= cplx_t'(wd[p]);
    end else if (load) begin
      bank1[ld_cnt[5:0]] <= in_data;
    end
    if (wr_en && !wr_bank1)
      for (int p = 0; p < 4; p++) bank2[ddd_rs[p]] <= cplx_t'(wd[p]);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      ld_cnt   <= '0;
      mode_ld  <= '0;
      mode_c   <= '0;
      comp     <= 1'b0;
      rank     <= '0;
      bcnt     <= '0;
      out_busy <= 1'b0;
      ocnt     <= '0;
    end else begin
      if (load) begin
        ld_cnt <= ld_cnt + 1'b1;
        if (ld_cnt == 7'd0) mode_ld <= '{inverse: inverse, scale: scale};
      end
      if (start) begin
        comp   <= 1'b1;
        rank   <= '0;
        bcnt   <= '0;
        mode_c <= mode_ld;
        ld_cnt <= '0;
      end else if (comp) begin
        if (bcnt == 5'd16) begin
          bcnt <= '0;
          if (rank == 2'd2) begin
            comp     <= 1'b0;
            out_busy <= 1'b1;
            ocnt     <= '0;
          end else begin
            rank <= rank + 1'b1;
          end
        end else begin
          bcnt <= bcnt + 1'b1;
        end
      end
      if (out_busy) begin
        ocnt <= ocnt + 1'b1;
        if (ocnt == 6'd63) out_busy <= 1'b0;
      end
    end
  end

  // Mem Out: X(k) sits at address 16*k0 + 4*k1 + k2
  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid <= 1'b0;
      out_index <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= out_busy;
      out_index <= ocnt;
      out_data  <= bank2[{ocnt[1:0], ocnt[3:2], ocnt[5:4]}];
    end
  end

  a_one_writer : assert property (@(posedge clk) disable iff (reset) !(choose_mem_reg && load))
    else $error("register_bank_fft: bank 1 written by Mem In and the butterfly at once");

endmodule
