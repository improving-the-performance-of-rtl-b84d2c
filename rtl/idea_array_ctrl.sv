// idea_array_ctrl: sequencer of the internal-array version of the design.
//
// The host leaves its data in a 32-bit memory bank of the board and starts
// the FPGA. This controller then works through the data one array-full at a
// time, keeping data movement and ciphering apart:
//   1. HEADER  read the 128-bit key and the job word from the bank and start
//              the key schedule (encryption or decryption subkeys);
//   2. FILL    copy up to one array of blocks from the bank into the
//              internal array, two 32-bit reads per 64-bit block;
//   3. COMPUTE feed the array's blocks to the phase-pipelined core, one per
//              phase time, and write each result back to the array slot it
//              came from;
//   4. DRAIN   copy the array back to the same place in the bank, two
//              32-bit writes per block;
// and repeats 2-4 until every block is done, then reports completion.
// The split into these activities, the array size and the two accesses per
// block follow the published design. The memory layout, the command and status
// encodings and the handshakes are this design's own.
//
// Memory bank layout (32-bit words, host-written):
//   0..3  key, word 0 = key bits 127:96
//   4     job word: bit 31 = 1 to decrypt, bits 23:0 = number of blocks N
//   8..   data, block k at words 8+2k (bits 63:32) and 9+2k (bits 31:0);
//         results overwrite the input in place.
// Memory port: synchronous SRAM, read data valid the cycle after mem_rd.
// The host must leave the bank alone while status bit 0 (busy) is set.
//
// Control port (host to FPGA, one byte per ctrl_wr strobe): 8'h01 = start,
// honoured only while idle. Status port (FPGA to host): bit 0 busy, bit 1
// done (set at the end of a job, cleared by the next start), other bits 0.
module idea_array_ctrl
  import idea_pkg::*;
#(
  parameter int unsigned ARRAY_CHARS = 1200,
  parameter int unsigned MEM_AW      = 19,
  localparam int unsigned DEPTH      = ARRAY_CHARS / (BLOCK_W / 8),
  localparam int unsigned AW         = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // control and status ports
  input  logic              ctrl_wr,
  input  logic [7:0]        ctrl_data,
  output logic [7:0]        status,
  // memory bank
  output logic [MEM_AW-1:0] mem_addr,
  output logic              mem_rd,
  output logic              mem_wr,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata,
  // key schedule
  output logic              ks_start,
  output logic              ks_decrypt,
  output key_t              ks_key,
  input  logic              ks_done,
  // internal array
  output logic              arr_we,
  output logic [AW-1:0]     arr_waddr,
  output block_t            arr_wdata,
  output logic [AW-1:0]     arr_raddr,
  input  block_t            arr_rdata,
  // computation module
  output logic              core_in_valid,
  output block_t            core_in_block,
  input  logic              core_in_ready,
  input  logic              core_out_valid,
  input  block_t            core_out_block
);
  localparam logic [7:0] CMD_START = 8'h01;
  localparam int unsigned HDR_WORDS = 5;
  localparam int unsigned DATA_BASE = 8;
  localparam int unsigned CNT_W     = 24;

  typedef enum logic [3:0] {
    S_IDLE, S_HEADER, S_KEY, S_NEXT, S_FILL, S_COMPUTE, S_DRAIN_RD, S_DRAIN_HI, S_DRAIN_LO
  } state_e;

  state_e             state_q;
  logic               done_q;
  logic [2:0]         hdr_cnt_q;
  logic               pend_q;             // a bank read was issued last cycle
  logic [AW+1:0]      pend_idx_q;         // which word it was (header or fill)
  logic [CNT_W-1:0]   total_q;            // blocks in the job
  logic [CNT_W-1:0]   base_q;             // first block of the current batch
  logic [AW:0]        nb_q;               // blocks in the current batch
  logic [AW+1:0]      wcnt_q;             // fill: words requested
  logic [AW:0]        in_idx_q, out_idx_q;
  logic               rd_fresh_q;         // array read data matches in_idx_q
  logic [AW-1:0]      j_q;                // drain: block being written
  logic [31:0]        lo_q, hi_q;
  logic [CNT_W-1:0]   remain;
  logic [AW:0]        nb_next;
  logic [MEM_AW-1:0]  batch_word;

  assign remain     = total_q - base_q;
  assign nb_next    = (remain > CNT_W'(DEPTH)) ? (AW+1)'(DEPTH) : (AW+1)'(remain);
  assign batch_word = MEM_AW'(DATA_BASE) + MEM_AW'({base_q, 1'b0});

  // ---------------------------------------------------------------- outputs
  always_comb begin
    mem_addr      = '0;
    mem_rd        = 1'b0;
    mem_wr        = 1'b0;
    mem_wdata     = '0;
    arr_we        = 1'b0;
    arr_waddr     = '0;
    arr_wdata     = '0;
    arr_raddr     = in_idx_q[AW-1:0];
    core_in_valid = 1'b0;
    unique case (state_q)
      S_HEADER: begin
        mem_rd   = (hdr_cnt_q < 3'(HDR_WORDS));
        mem_addr = MEM_AW'(hdr_cnt_q);
      end
      S_FILL: begin
        mem_rd    = (wcnt_q < {nb_q, 1'b0});
        mem_addr  = batch_word + MEM_AW'(wcnt_q);
        arr_we    = pend_q && pend_idx_q[0];
        arr_waddr = pend_idx_q[AW:1];
        arr_wdata = {hi_q, mem_rdata};
      end
      S_COMPUTE: begin
        core_in_valid = (in_idx_q < nb_q) && rd_fresh_q;
        arr_we        = core_out_valid;
        arr_waddr     = out_idx_q[AW-1:0];
        arr_wdata     = core_out_block;
      end
      S_DRAIN_RD: arr_raddr = j_q;
      S_DRAIN_HI: begin
        arr_raddr = j_q;
        mem_wr    = 1'b1;
        mem_addr  = batch_word + MEM_AW'({j_q, 1'b0});
        mem_wdata = arr_rdata[63:32];
      end
      S_DRAIN_LO: begin
        arr_raddr = j_q + AW'(1);
        mem_wr    = 1'b1;
        mem_addr  = batch_word + MEM_AW'({j_q, 1'b1});
        mem_wdata = lo_q;
      end
      default: ;
    endcase
  end

  assign core_in_block = arr_rdata;
  assign status        = {6'b0, done_q, state_q != S_IDLE};

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      done_q     <= 1'b0;
      hdr_cnt_q  <= '0;
      pend_q     <= 1'b0;
      pend_idx_q <= '0;
      total_q    <= '0;
      base_q     <= '0;
      nb_q       <= '0;
      wcnt_q     <= '0;
      in_idx_q   <= '0;
      out_idx_q  <= '0;
      rd_fresh_q <= 1'b0;
      j_q        <= '0;
      lo_q       <= '0;
      hi_q       <= '0;
      ks_start   <= 1'b0;
      ks_decrypt <= 1'b0;
      ks_key     <= '0;
    end else begin
      ks_start <= 1'b0;
      pend_q   <= mem_rd;
      unique case (state_q)
        S_IDLE: if (ctrl_wr && ctrl_data == CMD_START) begin
          done_q    <= 1'b0;
          hdr_cnt_q <= '0;
          state_q   <= S_HEADER;
        end
        S_HEADER: begin
          if (mem_rd) begin
            hdr_cnt_q  <= hdr_cnt_q + 3'd1;
            pend_idx_q <= (AW+2)'(hdr_cnt_q);
          end
          if (pend_q) begin
            unique case (pend_idx_q[2:0])
              3'd0: ks_key[127:96] <= mem_rdata;
              3'd1: ks_key[95:64]  <= mem_rdata;
              3'd2: ks_key[63:32]  <= mem_rdata;
              3'd3: ks_key[31:0]   <= mem_rdata;
              default: begin
                ks_decrypt <= mem_rdata[31];
                total_q    <= mem_rdata[CNT_W-1:0];
                base_q     <= '0;
                ks_start   <= 1'b1;
                state_q    <= S_KEY;
              end
            endcase
          end
        end
        S_KEY: if (ks_done) begin
          if (total_q == '0) begin
            done_q  <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            state_q <= S_NEXT;
          end
        end
        S_NEXT: begin
          nb_q    <= nb_next;
          wcnt_q  <= '0;
          state_q <= S_FILL;
        end
        S_FILL: begin
          if (mem_rd) begin
            wcnt_q     <= wcnt_q + (AW+2)'(1);
            pend_idx_q <= wcnt_q;
          end
          if (pend_q) begin
            if (!pend_idx_q[0]) hi_q <= mem_rdata;
            else if (pend_idx_q[AW+1:1] == nb_q - (AW+1)'(1)) begin
              in_idx_q   <= '0;
              out_idx_q  <= '0;
              rd_fresh_q <= 1'b0;
              state_q    <= S_COMPUTE;
            end
          end
        end
        S_COMPUTE: begin
          if (core_in_valid && core_in_ready) begin
            in_idx_q   <= in_idx_q + (AW+1)'(1);
            rd_fresh_q <= 1'b0;
          end else begin
            rd_fresh_q <= 1'b1;
          end
          if (core_out_valid) begin
            out_idx_q <= out_idx_q + (AW+1)'(1);
            if (out_idx_q == nb_q - (AW+1)'(1)) begin
              j_q     <= '0;
              state_q <= S_DRAIN_RD;
            end
          end
        end
        S_DRAIN_RD: state_q <= S_DRAIN_HI;
        S_DRAIN_HI: begin
          lo_q    <= arr_rdata[31:0];
          state_q <= S_DRAIN_LO;
        end
        S_DRAIN_LO: begin
          j_q <= j_q + AW'(1);
          if ((AW+1)'(j_q) == nb_q - (AW+1)'(1)) begin
            if (remain == CNT_W'(nb_q)) begin
              done_q  <= 1'b1;
              state_q <= S_IDLE;
            end else begin
              base_q  <= base_q + CNT_W'(nb_q);
              state_q <= S_NEXT;
            end
          end else begin
            state_q <= S_DRAIN_HI;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
